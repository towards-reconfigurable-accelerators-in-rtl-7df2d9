// tb_cnn_sparsity_detect: random windows, many of them partly or fully zero, for every
// kernel edge 1..3; checks the sum of the active taps and the zero flag against a model.
module tb_cnn_sparsity_detect;
  import cnn_pkg::*;
  window_t    win;
  logic [1:0] ksize;
  logic [11:0] sum;
  logic       zero;
  int checks = 0, failures = 0, zeros = 0;

  cnn_sparsity_detect dut (.win, .ksize, .sum, .zero);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int s;
      ksize = 2'($urandom_range(1, 3));
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          win[r][c] = ($urandom_range(0, 9) < 8) ? 8'd0 : 8'($urandom);
      if (i % 10 == 0) win = '0;
      s = 0;
      for (int r = 3 - ksize; r < 3; r++)
        for (int c = 3 - ksize; c < 3; c++) s += win[r][c];
      #1;
      checks += 2;
      if (sum !== 12'(s)) failures++;
      if (zero !== (s == 0)) failures++;
      if (s == 0) zeros++;
    end
    if (zeros == 0) failures++;
    $display("zero windows seen: %0d", zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
