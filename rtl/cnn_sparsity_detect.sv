// cnn_sparsity_detect: coarse-grained sparsity detection. Adds up the input features of the
// active KxK part of a window (the bottom-right ksize x ksize taps) and flags the window
// as empty when the sum is zero. Input features are unsigned (they come out of a ReLU or
// are image pixels), so a zero sum means every feature is zero and the convolution result
// is zero without any multiplication. Purely combinational.
// Following the document: detection via the sum of the input feature kernel. The unsigned
// input format that makes the sum test exact is this design's choice.
module cnn_sparsity_detect
  import cnn_pkg::*;
#(
  localparam int unsigned SUM_W = DATA_W + $clog2(KMAX*KMAX)
) (
  input  window_t          win,
  input  logic [1:0]       ksize,    // 1..3
  output logic [SUM_W-1:0] sum,
  output logic             zero
);
  always_comb begin
    sum = '0;
    for (int r = 0; r < KMAX; r++)
      for (int c = 0; c < KMAX; c++)
        if (r >= KMAX - int'(ksize) && c >= KMAX - int'(ksize))
          sum += SUM_W'(win[r][c]);
    zero = (sum == '0);
  end
endmodule
