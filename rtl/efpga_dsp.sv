// efpga_dsp: model of one eFPGA DSP block: a signed IN_W x IN_W multiplier followed by an
// ACC_W-bit accumulator register. When 'en' is high the register takes a*b if 'clr' is
// high, otherwise acc + a*b (wrapping); when 'en' is low it holds. The result appears one
// cycle after the operands. The 16-bit inputs and 32-bit accumulator are the tile's DSP
// configuration; the en/clr control is this design's choice. Reset clears the register.
module efpga_dsp #(
  parameter int unsigned IN_W  = cnn_pkg::DSP_IN_W,
  parameter int unsigned ACC_W = cnn_pkg::DSP_ACC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic signed [IN_W-1:0]  a,
  input  logic signed [IN_W-1:0]  b,
  output logic signed [ACC_W-1:0] acc
);
  logic signed [2*IN_W-1:0] prod;
  assign prod = a * b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (en)  acc <= (clr ? '0 : acc) + ACC_W'(prod);
  end
endmodule
