// cnn_accel: convolution accelerator. A stream of 8-bit input features (one feature map,
// row-major) enters the line buffer, which forms KxK windows (K = 1..3, set at run time,
// stride 1, no padding). Each window is broadcast to NUM_MK microkernels; each applies its
// own weight set from the weight buffer, so NUM_MK output channels are computed at once
// from the same input. Windows whose features sum to zero are recognised by sparsity
// detection and skipped: they take one cycle instead of K and give zero. The results go
// through the activation unit into the back-pressure buffer, and leave as one vector of
// NUM_MK 16-bit lanes per window on res_*.
//
// Rate: with MACS = 3 MACs per microkernel (the default; a synthesis parameter) one
// window every K cycles, in general every ceil(K*K/MACS) cycles, and one every cycle if
// sparse; border pixels that complete no window take one cycle, or none when taken while
// the microkernels are still busy.
// A window is started only when all microkernels are free and the back-pressure buffer has
// room for it and for the result still in flight; otherwise the line buffer, and so the
// input stream, waits. Summing over input channels, pooling, and the setup of the streams
// are left to the host processor, as are the run-time settings (cfg_*, weights, swap).
//
// Following the document: line buffer, weight buffer, back-pressure buffer, microkernels
// of three MACs with 16 of them, sum-based sparsity detection, activation, 8-bit operands
// and 16-bit results. This design's choices: the stream formats, the skip timing, the
// activation modes and the buffer depth.
module cnn_accel
  import cnn_pkg::*;
#(
  parameter int unsigned NUM_MK   = NUM_MK_DEF,
  parameter int unsigned LINE_W   = LINE_W_DEF,
  parameter int unsigned BP_DEPTH = BP_DEPTH_DEF,
  parameter int unsigned MACS     = MACS_DEF,
  localparam int unsigned XW = $clog2(LINE_W + 1),
  localparam int unsigned MW = (NUM_MK > 1) ? $clog2(NUM_MK) : 1,
  localparam int unsigned BW = $clog2(BP_DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // run-time configuration
  input  logic                    clear,       // start of a feature map
  input  logic [XW-1:0]           cfg_width,
  input  logic [1:0]              cfg_ksize,
  input  act_e                    cfg_act,
  input  logic [3:0]              cfg_shift,
  // weight loading
  input  logic                    wl_valid,
  input  logic [MW-1:0]           wl_mk,
  input  logic [3:0]              wl_tap,
  input  logic [DATA_W-1:0]       wl_data,
  input  logic                    w_swap,
  output logic                    w_bank,      // active weight bank
  // input features
  input  logic                    pix_valid,
  output logic                    pix_ready,
  input  logic [DATA_W-1:0]       pix_data,
  // results
  output logic                    res_valid,
  input  logic                    res_ready,
  output logic [NUM_MK*ACC_W-1:0] res_data,
  // activity counters
  output logic [31:0]             stat_windows,
  output logic [31:0]             stat_skipped
);
  window_t win;
  logic    win_valid, win_ready;
  logic    sparse;
  wset_t   w [NUM_MK];
  logic [NUM_MK-1:0] mk_ready, mk_done;
  logic [ACC_W-1:0]  mk_res [NUM_MK];
  logic [ACC_W-1:0]  act_res [NUM_MK];
  logic [BW:0]       bp_free;
  logic              inflight, issue, push;
  logic [NUM_MK*ACC_W-1:0] push_data;

  cnn_line_buffer #(.LINE_W(LINE_W)) u_lb (
    .clk, .rst_n, .clear, .cfg_width, .cfg_ksize,
    .pix_valid, .pix_ready, .pix_data,
    .win_valid, .win_ready, .win
  );

  cnn_sparsity_detect u_sparse (.win, .ksize(cfg_ksize), .sum(), .zero(sparse));

  cnn_weight_buffer #(.NUM_MK(NUM_MK)) u_wb (
    .clk, .rst_n, .wl_valid, .wl_mk, .wl_tap, .wl_data, .swap(w_swap), .bank(w_bank), .w
  );

  assign issue     = win_valid && (&mk_ready) && (bp_free > (BW+1)'(inflight));
  assign win_ready = issue;

  for (genvar m = 0; m < NUM_MK; m++) begin : g_mk
    cnn_microkernel #(.MACS(MACS)) u_mk (
      .clk, .rst_n,
      .in_valid(issue), .in_ready(mk_ready[m]),
      .in_win(win), .in_w(w[m]), .in_ksize(cfg_ksize), .in_skip(sparse),
      .res_valid(mk_done[m]), .res(mk_res[m])
    );
  end

  cnn_activation #(.NUM_MK(NUM_MK)) u_act (.cfg_act, .cfg_shift, .x(mk_res), .y(act_res));

  assign push = mk_done[0];
  always_comb
    for (int m = 0; m < NUM_MK; m++) push_data[m*ACC_W +: ACC_W] = act_res[m];

  cnn_bp_buffer #(.NUM_MK(NUM_MK), .DEPTH(BP_DEPTH)) u_bp (
    .clk, .rst_n, .push, .in_data(push_data),
    .out_valid(res_valid), .out_ready(res_ready), .out_data(res_data), .free(bp_free)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight <= 1'b0; stat_windows <= '0; stat_skipped <= '0;
    end else begin
      if (issue)      inflight <= 1'b1;
      else if (push)  inflight <= 1'b0;
      if (issue) stat_windows <= stat_windows + 1;
      if (issue && sparse) stat_skipped <= stat_skipped + 1;
    end
  end

  // the microkernels work in lock-step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) (mk_done == '0) || (&mk_done));
endmodule
