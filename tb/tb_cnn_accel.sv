// tb_cnn_accel: runs small feature maps through the whole accelerator with its default 16
// microkernels and compares every result lane with a reference convolution (8-bit unsigned
// features, 8-bit signed weights, 16-bit saturation, then the activation and shift).
// Runs cover 3x3, 2x2 and 1x1 kernels, ReLU and pass-through, weight loading into the
// shadow bank during a run followed by a swap, feature maps with zero regions (sparse
// windows that are skipped), and a consumer that stalls so that the back-pressure buffer
// fills and the input stream stops. The window and skip counters and, for an unstalled
// run, the total cycle count (K cycles per window, 1 per skipped window or border pixel)
// are checked too.
module tb_cnn_accel;
  import cnn_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, clear = 0, wl_valid = 0, w_swap = 0, pix_valid = 0, res_ready = 1;
  logic [7:0] cfg_width = 8'd8, pix_data = 0, wl_data = 0;
  logic [1:0] cfg_ksize = 2'd3;
  act_e       cfg_act = ACT_RELU;
  logic [3:0] cfg_shift = 0, wl_mk = 0, wl_tap = 0;
  logic pix_ready, res_valid, w_bank;
  logic [N*16-1:0] res_data;
  logic [31:0] stat_windows, stat_skipped;
  int checks = 0, failures = 0, bp_full = 0, in_stall = 0;
  byte unsigned img [12][20];
  logic [7:0] wts [2][N][9];
  int act_bank;
  always #5 clk = !clk;

  cnn_accel dut (.clk, .rst_n, .clear, .cfg_width, .cfg_ksize, .cfg_act, .cfg_shift,
                 .wl_valid, .wl_mk, .wl_tap, .wl_data, .w_swap, .w_bank, .pix_valid, .pix_ready,
                 .pix_data, .res_valid, .res_ready, .res_data, .stat_windows, .stat_skipped);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int H, W, K, exp_r, exp_c, got, exp_skip;
  bit stall_rnd;

  function automatic logic [15:0] ref_lane(int r, int c, int m);
    int s = 0;
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        s += int'(img[r - K + 1 + i][c - K + 1 + j]) *
             int'($signed(wts[act_bank][m][(3 - K + i) * 3 + (3 - K + j)]));
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    if (cfg_act == ACT_RELU && s < 0) s = 0;
    s = s >>> cfg_shift;
    return 16'(s);
  endfunction

  always @(posedge clk) if (rst_n && !clear) begin
    if (res_valid && res_ready) begin
      for (int m = 0; m < N; m++) begin
        checks++;
        if (res_data[m*16 +: 16] !== ref_lane(exp_r, exp_c, m)) begin
          failures++;
          if (failures < 6) $display("window (%0d,%0d) lane %0d: %h expected %h", exp_r, exp_c, m,
                                     res_data[m*16 +: 16], ref_lane(exp_r, exp_c, m));
        end
      end
      got++;
      exp_c++;
      if (exp_c == W) begin exp_c = K - 1; exp_r++; end
    end
    if (dut.bp_free == 0) bp_full++;
    if (pix_valid && !pix_ready) in_stall++;
  end
  always @(negedge clk) res_ready <= stall_rnd ? ($urandom_range(0, 7) == 0) : 1'b1;

  task automatic load_weights(bit swap_after);
    for (int m = 0; m < N; m++)
      for (int t = 0; t < 9; t++) begin
        @(negedge clk);
        wl_valid = 1; wl_mk = 4'(m); wl_tap = 4'(t); wl_data = 8'($urandom);
        wts[1 - act_bank][m][t] = wl_data;
      end
    @(negedge clk);
    wl_valid = 0;
    if (swap_after) begin
      w_swap = 1;
      @(negedge clk);
      w_swap = 0;
      act_bank = 1 - act_bank;
    end
  endtask

  task automatic run(int h, int w, int k, act_e act, int shift, bit sparse_img, bit rnd);
    int cyc, sums_zero, expected_cycles;
    H = h; W = w; K = k; stall_rnd = rnd;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        img[r][c] = (sparse_img && (r < h / 2 || c < 3)) ? 8'd0 : 8'($urandom);
    exp_skip = 0; expected_cycles = 0;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        if (r >= k - 1 && c >= k - 1) begin
          sums_zero = 0;
          for (int i = 0; i < k; i++) for (int j = 0; j < k; j++) sums_zero += img[r - i][c - j];
          if (sums_zero == 0) begin exp_skip++; expected_cycles += 1; end
          else expected_cycles += k;
        end else expected_cycles += 1;
    @(negedge clk);
    cfg_width = 8'(w); cfg_ksize = 2'(k); cfg_act = act; cfg_shift = 4'(shift); clear = 1;
    exp_r = k - 1; exp_c = k - 1; got = 0;
    @(negedge clk);
    clear = 0;
    begin
      automatic int w0 = stat_windows, s0 = stat_skipped;
      cyc = 0;
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++) begin
          pix_valid = 1; pix_data = img[r][c];
          @(posedge clk);
          cyc++;
          while (!pix_ready) begin @(posedge clk); cyc++; end
          @(negedge clk);
          pix_valid = 0;
        end
      while (got < (h - k + 1) * (w - k + 1) && cyc < 20000) begin @(posedge clk); cyc++; end
      @(negedge clk);
      checks += 3;
      if (got != (h - k + 1) * (w - k + 1)) failures++;
      if (stat_windows - w0 != 32'((h - k + 1) * (w - k + 1))) failures++;
      if (stat_skipped - s0 != 32'(exp_skip)) begin
        failures++; $display("skipped %0d expected %0d", stat_skipped - s0, exp_skip);
      end
      if (!rnd) begin
        // the last pixel is taken after its predecessors' windows; allow the pipeline fill
        checks++;
        if (cyc < expected_cycles - k || cyc > expected_cycles + 4) begin
          failures++;
          $display("run took %0d cycles, expected about %0d", cyc, expected_cycles);
        end
      end
      $display("run %0dx%0d K=%0d: %0d windows, %0d skipped, %0d cycles", h, w, k, got,
               stat_skipped - s0, cyc);
    end
  endtask

  initial begin
    act_bank = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_weights(1);
    run(6, 8, 3, ACT_RELU, 0, 0, 0);
    run(8, 10, 3, ACT_NONE, 0, 1, 0);
    fork
      run(7, 9, 3, ACT_RELU, 2, 1, 1);
      load_weights(0);
    join
    @(negedge clk); w_swap = 1; @(negedge clk); w_swap = 0; act_bank = 1 - act_bank;
    run(6, 7, 2, ACT_NONE, 1, 0, 1);
    run(5, 12, 1, ACT_RELU, 0, 1, 0);
    run(12, 20, 3, ACT_RELU, 3, 0, 1);
    checks += 2;
    if (bp_full == 0) failures++;
    if (in_stall == 0) failures++;
    $display("back-pressure buffer full %0d cycles, input stalled %0d cycles", bp_full, in_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
