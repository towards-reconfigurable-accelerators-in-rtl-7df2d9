// tb_cnn_bp_buffer: random pushes (only when 'free' allows) and random consumer stalls;
// checks order and contents against a queue model, the free count, and that the buffer
// fills up completely at least once.
module tb_cnn_bp_buffer;
  localparam int N = 16, D = 16;
  logic clk = 0, rst_n = 0, push = 0, out_ready = 0, out_valid;
  logic [N*16-1:0] in_data = '0, out_data;
  logic [4:0] free;
  logic [N*16-1:0] q [$];
  int checks = 0, failures = 0, fulls = 0;
  always #5 clk = !clk;

  cnn_bp_buffer #(.NUM_MK(N), .DEPTH(D)) dut (.clk, .rst_n, .push, .in_data, .out_valid,
                                               .out_ready, .out_data, .free);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (free !== 5'(D - q.size())) failures++;
      if (free == 0) fulls++;
      checks++;
      if (out_valid !== (q.size() != 0)) failures++;
      if (out_valid) begin
        checks++;
        if (out_data !== q[0]) failures++;
      end
      out_ready = (i / 500) % 2 ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      push      = (free != 0) && $urandom_range(0, 1);
      for (int k = 0; k < N; k++) in_data[k*16 +: 16] = 16'($urandom);
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (push) q.push_back(in_data);
    end
    if (fulls == 0) failures++;
    $display("buffer full in %0d cycles", fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
