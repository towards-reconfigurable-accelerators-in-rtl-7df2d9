// tb_efpga_tile: end-to-end test of the tile top at its default sizes (Picos: TM 512,
// DM 2048, VM 2048, 4 dependences; CNN: 16 microkernels, 244-pixel lines). Both
// accelerators are exercised in one run, each through its own ports.
// Picos: 1200 tasks, the first 600 of which all share one address so that they form one
// long chain; the task memory fills and submission stalls. A scheduler model with 8 cores
// runs dispatched tasks, rejects some, and reports finishes. A reference model checks the
// dependence order, identifiers and info words, and that every task completes.
// CNN: a full-width 244-pixel feature map with a 3x3 kernel and ReLU, then a 1x1 pass
// after a weight swap, each result lane compared with a reference convolution, with
// output stalls that fill the back-pressure buffer and zero regions that are skipped.
// Every mechanism must be seen at least once: dependence wait, task memory full, reject,
// task without dependences, sparse skip, back-pressure full with input stalled, weight
// bank swap, kernel-size change.
module tb_efpga_tile;
  import cnn_pkg::*;
  localparam int MD = 4, NTASKS = 1200, NCORES = 8, POOL = 64, N = 16;
  logic clk = 0, rst_n = 0;
  // Picos side
  logic sub_valid = 0, sub_ready;
  logic [31:0] sub_tid = 0;
  logic [15:0] sub_info = 0;
  logic [2:0]  sub_ndeps = 0;
  logic [MD*64-1:0] sub_addr = '0;
  logic disp_valid, disp_ready = 0;
  logic [8:0] disp_slot;
  logic [31:0] disp_tid;
  logic [15:0] disp_info;
  logic rej_valid = 0, rej_ready;
  logic [8:0] rej_slot = 0;
  logic [31:0] rej_tid = 0;
  logic fin_valid = 0, fin_ready;
  logic [8:0] fin_slot = 0;
  logic [9:0] tm_free;
  logic [11:0] vm_free, dm_free;
  // CNN side
  logic cnn_clear = 0, wl_valid = 0, w_swap = 0, w_bank, pix_valid = 0, pix_ready;
  logic res_valid, res_ready = 1;
  logic [7:0] cnn_width = 8'd244, wl_data = 0, pix_data = 0;
  logic [1:0] cnn_ksize = 2'd3;
  act_e cnn_act = ACT_RELU;
  logic [3:0] cnn_shift = 0, wl_mk = 0, wl_tap = 0;
  logic [N*16-1:0] res_data;
  logic [31:0] stat_windows, stat_skipped;

  int checks = 0, failures = 0;
  int n_wait = 0, n_tm_full = 0, n_rej = 0, n_nodep = 0, n_done = 0, n_disp = 0;
  int n_skip = 0, n_bp_full = 0, n_in_stall = 0, n_swap = 0, n_kswitch = 0;
  bit picos_done = 0, cnn_done = 0;
  always #5 clk = !clk;

  efpga_tile dut (.*);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog: picos %0d tasks done, cnn done %0d", n_done, cnn_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ================= Picos =================
  int          t_nd   [NTASKS];
  logic [63:0] t_addr [NTASKS][MD];
  bit          t_done [NTASKS], t_waited [NTASKS];
  int          t_slot [NTASKS];

  function automatic bit may_run(int t);
    for (int e = 0; e < t; e++)
      if (!t_done[e])
        for (int i = 0; i < t_nd[t]; i++)
          for (int j = 0; j < t_nd[e]; j++)
            if (t_addr[t][i] == t_addr[e][j]) return 0;
    return 1;
  endfunction

  initial begin
    for (int t = 0; t < NTASKS; t++) begin
      int nd;
      nd = (t < 600) ? $urandom_range(1, MD) : $urandom_range(0, MD);
      t_nd[t] = nd;
      for (int i = 0; i < nd; i++) begin
        bit dup;
        do begin
          t_addr[t][i] = (t < 600 && i == 0) ? 64'h4000_0000 :
                         64'h8000_0000 + 64'($urandom_range(0, POOL - 1)) * 64;
          dup = 0;
          for (int j = 0; j < i; j++) if (t_addr[t][j] == t_addr[t][i]) dup = 1;
        end while (dup);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NTASKS; t++) begin
      @(negedge clk);
      sub_valid = 1; sub_tid = 32'(t) ^ 32'h3c3c_0000; sub_info = 16'(t * 13);
      sub_ndeps = 3'(t_nd[t]);
      for (int i = 0; i < MD; i++) sub_addr[i*64 +: 64] = (i < t_nd[t]) ? t_addr[t][i] : 64'h0;
      if (t_nd[t] == 0) n_nodep++;
      #3;
      while (!sub_ready) begin
        if (tm_free == 0) n_tm_full++;
        @(negedge clk); #3;
      end
      t_waited[t] = !may_run(t);
      if (t_waited[t]) n_wait++;
      @(negedge clk);
      sub_valid = 0;
    end
  end

  int core_task [NCORES], core_left [NCORES];
  int pend_rej [$];
  initial for (int c = 0; c < NCORES; c++) core_task[c] = -1;

  // handshakes, seen at the rising edge where they complete
  bit rejecting;
  always @(posedge clk) if (rst_n) begin
    int freec, t;
    if (fin_valid && fin_ready) fin_valid <= 0;
    if (rej_valid && rej_ready) rej_valid <= 0;
    if (disp_valid && disp_ready) begin
      t = int'(disp_tid ^ 32'h3c3c_0000);
      checks++;
      if (t < 0 || t >= NTASKS || t_done[t] || disp_info != 16'(t * 13)) begin
        failures++;
        $display("bad dispatch tid %h info %h", disp_tid, disp_info);
      end else begin
        checks++;
        if (!may_run(t)) begin
          failures++;
          $display("task %0d dispatched before an earlier task on a shared address finished", t);
        end
        t_slot[t] = int'(disp_slot);
        if (rejecting) begin
          pend_rej.push_back(t);
          n_rej++;
        end else begin
          freec = -1;
          for (int c = 0; c < NCORES; c++) if (core_task[c] < 0 && freec < 0) freec = c;
          core_task[freec] = t;
          core_left[freec] = $urandom_range(2, 12);
          n_disp++;
        end
      end
    end
  end

  // requests for the next edge
  always @(negedge clk) if (rst_n) begin
    int busy;
    busy = 0;
    for (int c = 0; c < NCORES; c++) if (core_task[c] >= 0) busy++;
    rejecting  = ($urandom_range(0, 30) == 0) && (pend_rej.size() == 0);
    disp_ready = (busy < NCORES);
    if (!rej_valid && pend_rej.size() > 0) begin
      int t;
      t = pend_rej.pop_front();
      rej_valid = 1; rej_slot = 9'(t_slot[t]); rej_tid = 32'(t) ^ 32'h3c3c_0000;
    end
    for (int c = 0; c < NCORES; c++) if (core_task[c] >= 0 && core_left[c] > 0) core_left[c]--;
    if (!fin_valid) begin
      for (int c = 0; c < NCORES; c++)
        if (!fin_valid && core_task[c] >= 0 && core_left[c] == 0) begin
          fin_valid = 1; fin_slot = 9'(t_slot[core_task[c]]);
          t_done[core_task[c]] = 1;
          core_task[c] = -1;
          n_done++;
        end
    end
  end

  initial begin
    wait (n_done == NTASKS);
    repeat (50) @(posedge clk);
    checks += 4;
    if (tm_free != 10'd512) failures++;
    if (vm_free != 12'd2048) failures++;
    if (dm_free != 12'd2048) failures++;
    if (n_disp != NTASKS) failures++;
    $display("free: tm %0d vm %0d dm %0d, dispatched %0d", tm_free, vm_free, dm_free, n_disp);
    picos_done = 1;
  end

  // ================= CNN =================
  byte unsigned img [6][244];
  logic [7:0] wts [2][N][9];
  int act_bank = 0;   // follows the active bank of the weight buffer
  int H, W, K, exp_r, exp_c, got;
  bit cnn_stall;

  function automatic logic [15:0] ref_lane(int r, int c, int m);
    int s = 0;
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        s += int'(img[r - K + 1 + i][c - K + 1 + j]) *
             int'($signed(wts[act_bank][m][(3 - K + i) * 3 + (3 - K + j)]));
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    if (cnn_act == ACT_RELU && s < 0) s = 0;
    return 16'(s >>> cnn_shift);
  endfunction

  always @(negedge clk) begin
    #2;
    if (rst_n && !cnn_clear) begin
      if (res_valid && res_ready) begin
        for (int m = 0; m < N; m++) begin
          checks++;
          if (res_data[m*16 +: 16] !== ref_lane(exp_r, exp_c, m)) begin
            failures++;
            if (failures < 6) $display("window (%0d,%0d) lane %0d wrong", exp_r, exp_c, m);
          end
        end
        got++;
        exp_c++;
        if (exp_c == W) begin exp_c = K - 1; exp_r++; end
      end
      if (dut.u_cnn.bp_free == 0 && pix_valid && !pix_ready) n_bp_full++;
      if (pix_valid && !pix_ready) n_in_stall++;
    end
  end
  always @(negedge clk) res_ready <= cnn_stall ? ($urandom_range(0, 9) == 0) : 1'b1;

  task automatic load_swap();
    for (int m = 0; m < N; m++)
      for (int t = 0; t < 9; t++) begin
        @(negedge clk);
        wl_valid = 1; wl_mk = 4'(m); wl_tap = 4'(t); wl_data = 8'($urandom);
        wts[1 - act_bank][m][t] = wl_data;
      end
    @(negedge clk);
    wl_valid = 0; w_swap = 1;
    @(negedge clk);
    w_swap = 0; act_bank = 1 - act_bank; n_swap++;
    checks++;
    if (w_bank != 1'(act_bank)) failures++;
  endtask

  task automatic cnn_run(int h, int w, int k, act_e act, bit stall);
    int s0;
    H = h; W = w; K = k; cnn_stall = stall;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        img[r][c] = (c > 100 && c < 160) ? 8'd0 : 8'($urandom);
    @(negedge clk);
    if (int'(cnn_ksize) != k) n_kswitch++;
    cnn_width = 8'(w); cnn_ksize = 2'(k); cnn_act = act; cnn_clear = 1;
    exp_r = k - 1; exp_c = k - 1; got = 0;
    @(negedge clk);
    cnn_clear = 0;
    s0 = int'(stat_skipped);
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        pix_valid = 1; pix_data = img[r][c];
        #3;
        while (!pix_ready) begin @(negedge clk); #3; end
        @(negedge clk);
        pix_valid = 0;
      end
    while (got < (h - k + 1) * (w - k + 1)) @(negedge clk);
    n_skip += int'(stat_skipped) - s0;
    checks++;
    if (got != (h - k + 1) * (w - k + 1)) failures++;
  endtask

  initial begin
    wait (rst_n);
    load_swap();
    cnn_run(5, 244, 3, ACT_RELU, 1);
    load_swap();
    cnn_run(3, 244, 1, ACT_NONE, 0);
    cnn_done = 1;
  end

  initial begin
    wait (picos_done && cnn_done);
    $display("picos: tasks %0d, waited %0d, TM-full stall cycles %0d, rejects %0d, no-dependence %0d",
             n_done, n_wait, n_tm_full, n_rej, n_nodep);
    $display("cnn: windows %0d, skipped %0d, back-pressure full cycles %0d, input stalls %0d, swaps %0d, kernel changes %0d",
             stat_windows, n_skip, n_bp_full, n_in_stall, n_swap, n_kswitch);
    checks += 10;
    if (n_wait == 0) failures++;
    if (n_tm_full == 0) failures++;
    if (n_rej == 0) failures++;
    if (n_nodep == 0) failures++;
    if (n_skip == 0) failures++;
    if (n_bp_full == 0) failures++;
    if (n_in_stall == 0) failures++;
    if (n_swap < 2) failures++;
    if (n_kswitch == 0) failures++;
    if (stat_windows != 32'(3 * 242 + 3 * 244)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
