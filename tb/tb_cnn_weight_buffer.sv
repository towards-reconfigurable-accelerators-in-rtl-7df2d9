// tb_cnn_weight_buffer: loads random weight sets into the shadow bank, checks that the
// active bank is unchanged while loading, swaps, and checks every weight of every
// microkernel; repeated for several swaps.
module tb_cnn_weight_buffer;
  import cnn_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, wl_valid = 0, swap = 0, bank;
  logic [3:0] wl_mk = 0, wl_tap = 0;
  logic [7:0] wl_data = 0;
  wset_t w [N];
  logic [7:0] model [2][N][9];
  int checks = 0, failures = 0, act;
  always #5 clk = !clk;

  cnn_weight_buffer #(.NUM_MK(N)) dut (.clk, .rst_n, .wl_valid, .wl_mk, .wl_tap, .wl_data,
                                       .swap, .bank, .w);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_active(int b);
    for (int m = 0; m < N; m++)
      for (int t = 0; t < 9; t++) begin
        checks++;
        if (w[m][t/3][t%3] !== model[b][m][t]) failures++;
      end
  endtask

  initial begin
    act = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      for (int m = 0; m < N; m++)
        for (int t = 0; t < 9; t++) begin
          @(negedge clk);
          wl_valid = 1; wl_mk = 4'(m); wl_tap = 4'(t); wl_data = 8'($urandom);
          model[1-act][m][t] = wl_data;
        end
      @(negedge clk);
      wl_valid = 0;
      if (round > 0) check_active(act);
      checks++;
      if (bank !== 1'(act)) failures++;
      swap = 1;
      @(negedge clk);
      swap = 0;
      act = 1 - act;
      checks++;
      if (bank !== 1'(act)) failures++;
      check_active(act);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
