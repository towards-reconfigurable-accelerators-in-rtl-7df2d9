// cnn_activation: applies the activation function to the NUM_MK results of one window.
// ACT_RELU clamps negative results to zero; ACT_NONE passes them unchanged (used while the
// host still adds up partial sums over input channels). Afterwards every lane is shifted
// right arithmetically by cfg_shift bits, which rescales the 16-bit result for the next
// layer's linear quantisation. Purely combinational.
// Following the document: activation is done in the accelerator. The function set and the
// shift are this design's choice.
module cnn_activation
  import cnn_pkg::*;
#(
  parameter int unsigned NUM_MK = NUM_MK_DEF
) (
  input  act_e             cfg_act,
  input  logic [3:0]       cfg_shift,
  input  logic [ACC_W-1:0] x [NUM_MK],
  output logic [ACC_W-1:0] y [NUM_MK]
);
  always_comb begin
    for (int m = 0; m < NUM_MK; m++) begin
      logic signed [ACC_W-1:0] v;
      v = signed'(x[m]);
      if (cfg_act == ACT_RELU && v < 0) v = '0;
      y[m] = ACC_W'(v >>> cfg_shift);
    end
  end
endmodule
