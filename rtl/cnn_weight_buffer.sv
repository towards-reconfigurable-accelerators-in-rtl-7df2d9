// cnn_weight_buffer: holds the KxK weight set of every microkernel so that a set is loaded
// once and reused for every window of a feature map. Two banks: the active bank feeds the
// microkernels, all NUM_MK sets in parallel; the load port (one 8-bit weight per cycle,
// addressed by microkernel and tap = row*3+column) writes the shadow bank, so the next
// layer's weights can be loaded while the current one runs. A 'swap' pulse exchanges the
// banks. After reset bank 0 is active.
// Following the document: a weight buffer next to the microkernels, with weights reused
// rather than reloaded. Double banking and the load format are this design's choice.
module cnn_weight_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned NUM_MK = NUM_MK_DEF,
  localparam int unsigned MW = (NUM_MK > 1) ? $clog2(NUM_MK) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wl_valid,
  input  logic [MW-1:0]     wl_mk,
  input  logic [3:0]        wl_tap,     // row*3 + column
  input  logic [DATA_W-1:0] wl_data,
  input  logic              swap,
  output logic              bank,       // active bank
  output wset_t             w [NUM_MK]
);
  wset_t mem [2][NUM_MK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    bank <= 1'b0;
    else if (swap) bank <= !bank;
  end

  always_ff @(posedge clk) begin
    if (wl_valid) mem[!bank][wl_mk][wl_tap / 4'd3][wl_tap % 4'd3] <= wl_data;
  end

  always_comb
    for (int m = 0; m < NUM_MK; m++) w[m] = mem[bank][m];

  a_tap_range: assert property (@(posedge clk) disable iff (!rst_n) wl_valid |-> (wl_tap < 4'd9));
endmodule
