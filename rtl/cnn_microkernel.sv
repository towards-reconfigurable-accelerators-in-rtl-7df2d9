// cnn_microkernel: computes one KxK convolution (the dot product of a window of unsigned
// 8-bit input features with a set of signed 8-bit weights) using MACS DSP blocks, three
// by default. The K*K active taps (the bottom-right ksize x ksize of the 3x3 window) are
// numbered row by row; in step t, DSP j takes tap t*MACS + j and adds its product to its
// accumulator, so an operation takes ceil(K*K / MACS) cycles. With three MACs that is one
// kernel row per cycle: 3 cycles for 3x3, 2 for 2x2, 1 for 1x1. The first step is taken
// straight from the inputs in the cycle the operation is accepted; the window and weights
// are kept for the later steps. One cycle after the last step, res_valid pulses and res
// holds the sum of the accumulators, saturated to ACC_W = 16 bits; a new operation may be
// accepted in that same cycle, so back-to-back operations follow without a gap.
// A window flagged 'skip' by sparsity detection is accepted in one cycle and gives a
// result of zero without using the DSPs.
// Following the document: three MACs per microkernel, with their number a synthesis
// parameter, 8-bit operands, 16-bit results, sparse windows skipped. The tap schedule and
// the saturation are this design's choice. There is no output handshake: the caller must
// take res when res_valid pulses.
module cnn_microkernel
  import cnn_pkg::*;
#(
  parameter int unsigned MACS = MACS_DEF,
  localparam int unsigned NT = KMAX * KMAX,
  localparam int unsigned TW = $clog2(NT + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  window_t          in_win,
  input  wset_t            in_w,
  input  logic [1:0]       in_ksize,   // 1..3
  input  logic             in_skip,
  output logic             res_valid,
  output logic [ACC_W-1:0] res
);
  // steps per operation for each kernel edge
  localparam logic [TW-1:0] STEPS1 = TW'((1 + MACS - 1) / MACS);
  localparam logic [TW-1:0] STEPS2 = TW'((4 + MACS - 1) / MACS);
  localparam logic [TW-1:0] STEPS3 = TW'((NT + MACS - 1) / MACS);

  window_t       win_q;
  wset_t         w_q;
  logic [1:0]    k_q, k_cur;
  logic [TW-1:0] t_q, t_cur, n_cur;
  logic          busy, done_q, zero_q;
  logic          start, mac_en, mac_clr, last;
  window_t       win_cur;
  wset_t         w_cur;
  logic signed [DSP_ACC_W-1:0] acc [MACS];

  assign in_ready = !busy;
  assign start    = in_valid && in_ready;

  // operands of the current step: from the inputs on the first cycle, then from the copy
  assign k_cur   = busy ? k_q   : in_ksize;
  assign t_cur   = busy ? t_q   : '0;
  assign win_cur = busy ? win_q : in_win;
  assign w_cur   = busy ? w_q   : in_w;
  assign n_cur   = (k_cur == 2'd3) ? STEPS3 : (k_cur == 2'd2) ? STEPS2 : STEPS1;
  assign mac_en  = busy || (start && !in_skip);
  assign mac_clr = !busy;
  assign last    = mac_en && (t_cur == n_cur - 1'b1);

  for (genvar j = 0; j < MACS; j++) begin : g_mac
    logic [DATA_W-1:0] x, wt;
    // tap t*MACS + j of the active KxK taps; zero operands once the taps run out
    always_comb begin
      x  = '0;
      wt = '0;
      for (int kk = 1; kk <= KMAX; kk++)
        for (int tt = 0; tt * MACS < kk * kk; tt++)
          if (int'(k_cur) == kk && int'(t_cur) == tt && tt * MACS + j < kk * kk) begin
            x  = win_cur[KMAX - kk + (tt * MACS + j) / kk][KMAX - kk + (tt * MACS + j) % kk];
            wt = w_cur[KMAX - kk + (tt * MACS + j) / kk][KMAX - kk + (tt * MACS + j) % kk];
          end
    end
    efpga_dsp u_dsp (
      .clk, .rst_n, .en(mac_en), .clr(mac_clr),
      .a(DSP_IN_W'({1'b0, x})),                         // unsigned feature
      .b(DSP_IN_W'(signed'(wt))),                       // signed weight
      .acc(acc[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; t_q <= '0; k_q <= 2'd1; done_q <= 1'b0; zero_q <= 1'b0;
      win_q <= '0; w_q <= '0;
    end else begin
      done_q <= (last) || (start && in_skip);
      if (start) zero_q <= in_skip;
      if (start && !in_skip) begin
        win_q <= in_win;
        w_q   <= in_w;
        k_q   <= in_ksize;
        t_q   <= TW'(1);
        busy  <= !last;
      end else if (busy) begin
        t_q <= t_q + 1'b1;
        if (last) busy <= 1'b0;
      end
    end
  end

  // sum and saturate
  logic signed [DSP_ACC_W+4:0] sum;
  always_comb begin
    sum = '0;
    for (int j = 0; j < MACS; j++) sum += (DSP_ACC_W+5)'(acc[j]);
  end
  localparam logic signed [DSP_ACC_W+4:0] MAXV = (DSP_ACC_W+5)'((1 << (ACC_W-1)) - 1);
  localparam logic signed [DSP_ACC_W+4:0] MINV = -(DSP_ACC_W+5)'(1 << (ACC_W-1));

  assign res_valid = done_q;
  assign res = zero_q      ? '0 :
               (sum > MAXV) ? ACC_W'(MAXV) :
               (sum < MINV) ? ACC_W'(MINV) : ACC_W'(sum);

  a_ksize: assert property (@(posedge clk) disable iff (!rst_n) start |-> (in_ksize != 2'd0));
  a_macs:  assert property (@(posedge clk) MACS >= 1 && MACS <= NT);
endmodule
