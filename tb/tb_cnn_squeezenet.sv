// tb_cnn_squeezenet: the CNN accelerator at its default sizes (16 microkernels of 3 MACs,
// 244-feature lines, 16-entry back-pressure buffer) on feature maps of the sizes found in
// SqueezeNet for a 224x224 image:
//   - a 3x3 expand layer on a 56x56 map, with inputs as a ReLU leaves them (about 40% of
//     the map in zero 4x4 patches, so that many windows are skipped);
//   - the same map without zeros (dense);
//   - a 1x1 squeeze layer on the 56x56 map;
//   - four lines of a full 224-wide input with a 3x3 kernel.
// Each pass loads a new weight set into the shadow bank and swaps it in. The consumer is
// always ready, so the input runs at full rate. Every lane of every result is compared with
// a reference convolution. The cycle count of each pass is compared with the schedule the
// accelerator is built for: K cycles per window, 1 cycle per skipped window and per
// border feature that completes no window, unless that feature is taken while the
// microkernels are still busy. For the dense 3x3 pass the three MACs of every
// microkernel must be busy in at least 95% of the cycles.
// The testbench prints the MAC utilisation and extrapolates the time of 962 million MACs
// at 159 MHz.
module tb_cnn_squeezenet;
  import cnn_pkg::*;
  localparam int N = 16, MAXH = 56, MAXW = 224;
  logic clk = 0, rst_n = 0;
  logic clear = 0, wl_valid = 0, w_swap = 0, w_bank, pix_valid = 0, pix_ready;
  logic res_valid, res_ready = 1;
  logic [7:0] cfg_width = 8'd56, wl_data = 0, pix_data = 0;
  logic [1:0] cfg_ksize = 2'd3;
  act_e cfg_act = ACT_RELU;
  logic [3:0] cfg_shift = 0, wl_mk = 0, wl_tap = 0;
  logic [N*16-1:0] res_data;
  logic [31:0] stat_windows, stat_skipped;

  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  cnn_accel dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned img [MAXH][MAXW];
  logic [7:0] wts [2][N][9];
  int act_bank = 0;
  int H, W, K, exp_r, exp_c, got, t_last;
  bit collecting = 0;

  function automatic logic [15:0] ref_lane(int r, int c, int m);
    int s = 0;
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        s += int'(img[r - K + 1 + i][c - K + 1 + j]) *
             int'($signed(wts[act_bank][m][(3 - K + i) * 3 + (3 - K + j)]));
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    if (cfg_act == ACT_RELU && s < 0) s = 0;
    return 16'(s >>> cfg_shift);
  endfunction

  always @(posedge clk) if (collecting && res_valid && res_ready) begin
    for (int m = 0; m < N; m++) begin
      checks++;
      if (res_data[m*16 +: 16] !== ref_lane(exp_r, exp_c, m)) begin
        failures++;
        if (failures < 6) $display("window (%0d,%0d) lane %0d wrong", exp_r, exp_c, m);
      end
    end
    got++;
    t_last = cyc;
    exp_c++;
    if (exp_c == W) begin exp_c = K - 1; exp_r++; end
  end

  task automatic load_swap();
    for (int m = 0; m < N; m++)
      for (int t = 0; t < 9; t++) begin
        @(negedge clk);
        wl_valid = 1; wl_mk = 4'(m); wl_tap = 4'(t); wl_data = 8'($urandom_range(0, 15) - 7);
        wts[1 - act_bank][m][t] = wl_data;
      end
    @(negedge clk);
    wl_valid = 0; w_swap = 1;
    @(negedge clk);
    w_swap = 0; act_bank = 1 - act_bank;
    checks++;
    if (w_bank != 1'(act_bank)) failures++;
  endtask

  task automatic layer(string name, int h, int w, int k, bit sparse, int min_util);
    int t0, sched = 0, skip = 0, s0, w0, z, macs, util_x10, slack;
    longint sq_cycles;
    H = h; W = w; K = k;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) img[r][c] = 8'($urandom_range(1, 255));
    if (sparse)
      for (int br = 0; br < h / 4; br++)
        for (int bc = 0; bc < w / 4; bc++)
          if ($urandom_range(0, 9) < 4)
            for (int r = 0; r < 4; r++)
              for (int c = 0; c < 4; c++) img[br * 4 + r][bc * 4 + c] = 0;
    // schedule: a feature that completes a window occupies the microkernels for K cycles
    // (1 if the window is zero); a feature that completes none takes one cycle, or none
    // if it is taken while the microkernels are still busy with the previous window
    slack = 0;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        if (r >= k - 1 && c >= k - 1) begin
          z = 0;
          for (int i = 0; i < k; i++)
            for (int j = 0; j < k; j++) z += img[r - i][c - j];
          if (z == 0) begin skip++; sched += 1; slack = 0; end
          else begin sched += k; slack = k - 1; end
        end else if (slack > 0) slack--;
        else sched += 1;
    load_swap();
    @(negedge clk);
    cfg_width = 8'(w); cfg_ksize = 2'(k); cfg_act = ACT_RELU; cfg_shift = 4'd2; clear = 1;
    exp_r = k - 1; exp_c = k - 1; got = 0;
    @(negedge clk);
    clear = 0;
    s0 = int'(stat_skipped); w0 = int'(stat_windows);
    collecting = 1;
    t0 = cyc;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        pix_valid = 1; pix_data = img[r][c];
        #3;
        while (!pix_ready) begin @(negedge clk); #3; end
        @(negedge clk);
        pix_valid = 0;
      end
    while (got < (h - k + 1) * (w - k + 1)) @(negedge clk);
    collecting = 0;
    checks += 3;
    if (int'(stat_windows) - w0 != (h - k + 1) * (w - k + 1)) failures++;
    if (int'(stat_skipped) - s0 != skip) begin
      failures++;
      $display("%s: %0d windows skipped, expected %0d", name, int'(stat_skipped) - s0, skip);
    end
    if (t_last - t0 < sched - k || t_last - t0 > sched + 6) begin
      failures++;
      $display("%s: %0d cycles, schedule %0d", name, t_last - t0, sched);
    end
    // useful MACs: KxK per non-skipped window and microkernel
    macs = ((h - k + 1) * (w - k + 1) - skip) * k * k * N;
    util_x10 = macs * 1000 / ((t_last - t0) * 3 * N);
    sq_cycles = longint'(962_000_000) * 1000 / (3 * N * util_x10);
    $display("%-22s %3dx%3d K=%0d: %0d windows, %0d skipped, %0d cycles (schedule %0d), %0d MACs, utilisation %0d.%0d%%, 962M MACs at this rate: %0d ms at 159 MHz",
             name, h, w, k, got, skip, t_last - t0, sched, macs, util_x10 / 10, util_x10 % 10,
             sq_cycles / 159_000);
    if (min_util > 0) begin
      checks++;
      if (util_x10 < min_util * 10) begin
        failures++;
        $display("%s: utilisation below %0d%%", name, min_util);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    layer("fire expand 3x3", 56, 56, 3, 1, 0);
    layer("fire expand 3x3 dense", 56, 56, 3, 0, 95);
    layer("fire squeeze 1x1", 56, 56, 1, 1, 0);
    layer("224-wide input 3x3", 4, 224, 3, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
