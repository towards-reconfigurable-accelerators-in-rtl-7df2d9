// cnn_bp_buffer: back-pressure buffer between the microkernels and the output stream. A
// first-in first-out queue of DEPTH result vectors (NUM_MK x 16 bits each). The
// microkernels have no output handshake, so the accelerator starts a window only when
// 'free' shows room for it and for any result still in flight; while the consumer stalls
// the queue fills and the input stream stops, and no result is ever lost.
// Push and pop may happen in the same cycle; the head is shown ahead on out_data.
// Following the document: a back-pressure buffer on the result path. The depth (16) and
// the credit rule are this design's choice.
module cnn_bp_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned NUM_MK = NUM_MK_DEF,
  parameter int unsigned DEPTH  = BP_DEPTH_DEF,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    push,
  input  logic [NUM_MK*ACC_W-1:0] in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [NUM_MK*ACC_W-1:0] out_data,
  output logic [AW:0]             free
);
  logic [NUM_MK*ACC_W-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          pop;

  assign out_valid = (cnt != '0);
  assign out_data  = mem[rp];
  assign pop       = out_valid && out_ready;
  assign free      = (AW+1)'(DEPTH) - cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end
  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> (cnt != (AW+1)'(DEPTH) || pop));
endmodule
