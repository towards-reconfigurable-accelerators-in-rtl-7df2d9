// tb_cnn_microkernel: random windows and weight sets for kernel edges 1..3, some sparse
// (skipped), some with extreme values to reach the 16-bit saturation, on five
// microkernels side by side with 3 (the default), 1, 2, 4 and 9 MACs. Each result is
// checked against a reference dot product, and so is the timing: a result arrives
// exactly ceil(K*K/MACS) cycles after its operation was accepted (1 cycle if skipped;
// K cycles with three MACs), and 100 back-to-back 3x3 operations are accepted over
// 99 * ceil(9/MACS) cycles.
module tb_cnn_microkernel;
  import cnn_pkg::*;
  localparam int NV = 5;
  localparam int MV [NV] = '{3, 1, 2, 4, 9};
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cycle = 0, sat_seen = 0, skip_seen = 0, n_done = 0;
  always #5 clk = !clk;
  always @(negedge clk) cycle++;
  initial begin
    @(posedge clk);
    @(negedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(window_t x, wset_t w, int k, bit skip);
    int s = 0;
    if (skip) return 0;
    for (int r = 3 - k; r < 3; r++)
      for (int c = 3 - k; c < 3; c++) s += int'(x[r][c]) * int'($signed(w[r][c]));
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return s;
  endfunction

  for (genvar g = 0; g < NV; g++) begin : g_v
    localparam int M = MV[g];
    logic in_valid = 0, in_skip = 0, in_ready, res_valid;
    window_t in_win = '0;
    wset_t   in_w = '0;
    logic [1:0] in_ksize = 2'd3;
    logic [15:0] res;
    int exp_q [$], due_q [$];

    cnn_microkernel #(.MACS(M)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_win, .in_w,
                                     .in_ksize, .in_skip, .res_valid, .res);

    always @(posedge clk) if (rst_n) begin
      if (res_valid) begin
        checks += 2;
        if (exp_q.size() == 0) failures += 2;
        else begin
          int e, d;
          e = exp_q.pop_front(); d = due_q.pop_front();
          if (res !== 16'(e)) begin
            failures++;
            if (failures < 5) $display("MACS %0d: result %h expected %h", M, res, 16'(e));
          end
          if (cycle != d) begin
            failures++;
            if (failures < 5) $display("MACS %0d: result at cycle %0d expected %0d", M, cycle, d);
          end
          if (e == 32767 || e == -32768) sat_seen++;
        end
      end
    end

    initial begin
      int k, start_cycle;
      repeat (2) @(posedge clk);
      @(negedge clk);
      start_cycle = 0;
      for (int i = 0; i < 1500; i++) begin
        bit gap;
        gap = (i >= 100) && ($urandom_range(0, 3) == 0);
        if (gap) begin in_valid = 0; @(negedge clk); end
        k = (i < 100) ? 3 : $urandom_range(1, 3);
        in_ksize = 2'(k);
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            in_win[r][c] = (i % 9 == 0) ? 8'hff : 8'($urandom);
            in_w[r][c]   = (i % 9 == 0) ? ((i % 2 == 1) ? 8'h7f : 8'h80) : 8'($urandom);
          end
        in_skip  = (i >= 100) && ($urandom_range(0, 5) == 0);
        if (in_skip) skip_seen++;
        in_valid = 1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (i == 0) start_cycle = cycle;
        exp_q.push_back(model(in_win, in_w, k, in_skip));
        due_q.push_back(cycle + (in_skip ? 1 : (k * k + M - 1) / M));
        if (i == 99) begin
          checks++;
          if (cycle - start_cycle != 99 * ((9 + M - 1) / M)) begin
            failures++;
            $display("MACS %0d: 100 operations accepted over %0d cycles", M, cycle - start_cycle);
          end
        end
        @(negedge clk);
      end
      in_valid = 0;
      repeat (12) @(posedge clk);
      checks++;
      if (exp_q.size() != 0) failures++;
      n_done++;
    end
  end

  initial begin
    wait (n_done == NV);
    checks++;
    if (sat_seen == 0 || skip_seen == 0) failures++;
    $display("saturated %0d, skipped %0d", sat_seen, skip_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
