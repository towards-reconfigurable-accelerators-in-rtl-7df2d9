// tb_picos_fifo: random pushes and pops on a 5-entry queue (not a power of two) with a
// reference queue: head data, out_valid, in_ready and the free count are checked every
// cycle, and the queue must be seen full and empty and with push and pop together.
module tb_picos_fifo;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [7:0] in_data = 0, out_data;
  logic [3:0] free;

  picos_fifo #(.WIDTH(8), .DEPTH(5)) dut (.*);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] q [$];
  int n_full = 0, n_empty = 0, n_both = 0;

  initial begin
    int bias;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      checks += 3;
      if (out_valid != (q.size() > 0)) failures++;
      if (in_ready != (q.size() < 5)) failures++;
      if (int'(free) != 5 - q.size()) failures++;
      if (q.size() > 0) begin
        checks++;
        if (out_data != q[0]) begin failures++; $display("head %h, expected %h", out_data, q[0]); end
      end
      if (q.size() == 5) n_full++;
      if (q.size() == 0) n_empty++;
      bias = (cyc / 500) % 3;
      in_valid  = $urandom_range(0, 9) < (bias == 0 ? 8 : bias == 1 ? 2 : 5);
      in_data   = 8'($urandom);
      out_ready = $urandom_range(0, 9) < (bias == 0 ? 2 : bias == 1 ? 8 : 5);
      if (in_valid && in_ready && out_valid && out_ready) n_both++;
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    $display("full %0d, empty %0d, push and pop together %0d", n_full, n_empty, n_both);
    checks += 3;
    if (n_full == 0) failures++;
    if (n_empty == 0) failures++;
    if (n_both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
