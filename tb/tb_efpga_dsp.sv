// tb_efpga_dsp: random operand and control sequences against a reference accumulator:
// checks multiply, clear, accumulate with 32-bit wrap-around, hold when disabled, and the
// one-cycle latency.
module tb_efpga_dsp;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic signed [15:0] a = 0, b = 0;
  logic signed [31:0] acc, model;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  efpga_dsp dut (.clk, .rst_n, .en, .clr, .a, .b, .acc);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 4) == 0);
      a   = (i % 50 == 0) ? 16'sh7fff : 16'($urandom);
      b   = (i % 50 == 0) ? 16'sh7fff : 16'($urandom);
      if (en) model = (clr ? 32'sd0 : model) + 32'(a * b);
      @(posedge clk); #1;
      checks++;
      if (acc !== model) begin
        failures++;
        if (failures < 5) $display("mismatch %0d: acc=%0d expected %0d", i, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
