// tb_cnn_line_buffer: streams random feature maps through the line buffer, with random gaps
// on the input and random stalls on the window side, for kernel edges 1..3 and several
// line widths including the full 244. Every window is compared with the one cut from the
// reference image, and the number of windows must be (H-K+1)*(W-K+1). Also checks that a
// window is held while not taken, and that the pixel rate is one per cycle with no stall.
module tb_cnn_line_buffer;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, pix_valid = 0, win_ready = 0;
  logic [7:0] cfg_width = 8'd8;
  logic [1:0] cfg_ksize = 2'd3;
  logic [7:0] pix_data = 0;
  logic pix_ready, win_valid;
  window_t win;
  int checks = 0, failures = 0, stalls = 0;
  byte unsigned img [8][244];
  always #5 clk = !clk;

  cnn_line_buffer dut (.clk, .rst_n, .clear, .cfg_width, .cfg_ksize, .pix_valid, .pix_ready,
                       .pix_data, .win_valid, .win_ready, .win);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: compares windows in raster order
  int exp_r, exp_c, got, H, W, K;
  bit random_stall;
  always @(posedge clk) if (rst_n && !clear) begin
    if (win_valid && win_ready) begin
      for (int i = 3 - K; i < 3; i++)
        for (int j = 3 - K; j < 3; j++) begin
          checks++;
          if (win[i][j] !== img[exp_r - 2 + i][exp_c - 2 + j]) begin
            failures++;
            if (failures < 5) $display("window (%0d,%0d) tap %0d,%0d: %h expected %h", exp_r, exp_c,
                                       i, j, win[i][j], img[exp_r - 2 + i][exp_c - 2 + j]);
          end
        end
      got++;
      exp_c++;
      if (exp_c == W) begin exp_c = K - 1; exp_r++; end
    end
    if (win_valid && !win_ready) stalls++;
  end
  always @(negedge clk) win_ready <= random_stall ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic run(int h, int w, int k, bit rnd);
    int cyc;
    H = h; W = w; K = k; random_stall = rnd;
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++) img[r][c] = 8'($urandom);
    @(negedge clk);
    cfg_width = 8'(w); cfg_ksize = 2'(k); clear = 1;
    exp_r = k - 1; exp_c = k - 1; got = 0;
    @(negedge clk);
    clear = 0;
    cyc = 0;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        pix_valid = rnd ? $urandom_range(0, 1) : 1'b1;
        while (!pix_valid) begin @(negedge clk); cyc++; pix_valid = $urandom_range(0, 1); end
        pix_data = img[r][c];
        @(posedge clk);
        while (!pix_ready) begin @(posedge clk); cyc++; end
        @(negedge clk);
        cyc++;
        pix_valid = 0;
      end
    repeat (4) @(negedge clk);
    checks++;
    if (got != (h - k + 1) * (w - k + 1)) begin
      failures++;
      $display("windows: %0d expected %0d", got, (h - k + 1) * (w - k + 1));
    end
    if (!rnd) begin
      checks++;
      if (cyc != h * w) begin failures++; $display("rate: %0d cycles for %0d pixels", cyc, h * w); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(6, 8, 3, 0);
    run(6, 8, 3, 1);
    run(5, 7, 2, 1);
    run(4, 5, 1, 1);
    run(5, 244, 3, 1);
    run(4, 244, 3, 0);
    run(3, 3, 3, 1);
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
