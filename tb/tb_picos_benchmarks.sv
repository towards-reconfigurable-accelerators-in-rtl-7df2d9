// tb_picos_benchmarks: Picos at its default sizes (TM 512, DM 2048, VM 2048, 4 dependences
// per task) driven by the task graphs of three task-parallel kernels, each run on a
// simulated machine with 8 and with 32 cores:
//   Cholesky  - tiled factorisation of a 12x12-block matrix: potrf(A[k][k]),
//               trsm(A[k][k], A[i][k]), syrk(A[i][k], A[i][i]), gemm(A[i][k], A[j][k], A[i][j]);
//   Heat      - Gauss-Seidel sweeps over a 16x16-block surface, 4 sweeps; block (i,j)
//               depends on itself and its upper, left and lower neighbours;
//   N-body    - 12 blocks of bodies, 3 time steps: forces(i,j) on F[i] and P[j],
//               then update(i) on P[i], F[i].
// The task graphs, their sizes and the task lengths are this testbench's own. Each task
// costs its length plus 40 cycles of communication overhead. The scheduler model gives
// every dispatched task to the first free core, like a simple hardware scheduler, and
// reports the finish when the core is done.
// Checks: every task is dispatched exactly once, never before an earlier task that shares
// an address has finished (every dependence orders tasks strictly); every task finishes
// and all memories are free again; the run takes at most 1/0.75 of the bound given by the
// dependence graph (the larger of work/cores and the longest chain); 32 cores are never
// slower than 8. Because every dependence orders its tasks, tasks that only read the same
// block also run one after another, which limits the parallelism of N-body.
// The Heat graph has more tasks than the task memory, so submission stalls on a full TM:
// that is counted and required.
module tb_picos_benchmarks;
  localparam int MD = 4, MAXT = 1100, OVH = 40, MAXC = 32;
  logic clk = 0, rst_n = 0;
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

  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  picos dut (.*);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- task graph ----------------
  int          nt;
  int          t_nd   [MAXT];
  logic [63:0] t_addr [MAXT][MD];
  int          t_cost [MAXT];
  bit          t_done [MAXT], t_disp [MAXT];
  int          t_slot [MAXT];
  int          t_ef   [MAXT];
  int          last_t [logic [63:0]];

  function automatic void add(int nd, logic [63:0] a0, logic [63:0] a1, logic [63:0] a2,
                              logic [63:0] a3, int len);
    t_nd[nt] = nd;
    t_addr[nt][0] = a0; t_addr[nt][1] = a1; t_addr[nt][2] = a2; t_addr[nt][3] = a3;
    t_cost[nt] = len + OVH;
    nt++;
  endfunction

  function automatic logic [63:0] blk(int base, int i, int j);
    return 64'(base) + 64'(i * 64 + j) * 64'd4096;
  endfunction

  function automatic void gen_cholesky();
    localparam int NB = 12;
    nt = 0;
    for (int k = 0; k < NB; k++) begin
      add(1, blk(32'h1000_0000, k, k), 0, 0, 0, 100);
      for (int i = k + 1; i < NB; i++)
        add(2, blk(32'h1000_0000, k, k), blk(32'h1000_0000, i, k), 0, 0, 150);
      for (int i = k + 1; i < NB; i++) begin
        for (int j = k + 1; j < i; j++)
          add(3, blk(32'h1000_0000, i, k), blk(32'h1000_0000, j, k),
              blk(32'h1000_0000, i, j), 0, 200);
        add(2, blk(32'h1000_0000, i, k), blk(32'h1000_0000, i, i), 0, 0, 150);
      end
    end
  endfunction

  function automatic void gen_heat();
    localparam int B = 16, T = 4;
    logic [63:0] a [MD];
    int n;
    nt = 0;
    for (int t = 0; t < T; t++)
      for (int i = 0; i < B; i++)
        for (int j = 0; j < B; j++) begin
          n = 0;
          a[n++] = blk(32'h2000_0000, i, j);
          if (i > 0)     a[n++] = blk(32'h2000_0000, i - 1, j);
          if (j > 0)     a[n++] = blk(32'h2000_0000, i, j - 1);
          if (i < B - 1) a[n++] = blk(32'h2000_0000, i + 1, j);
          add(n, a[0], a[1], a[2], a[3], 150);
        end
  endfunction

  function automatic void gen_nbody();
    localparam int NB = 12, T = 3;
    nt = 0;
    for (int t = 0; t < T; t++) begin
      for (int i = 0; i < NB; i++)
        for (int j = 0; j < NB; j++)
          add(2, blk(32'h3000_0000, 0, i), blk(32'h3000_0000, 1, j), 0, 0, 100);
      for (int i = 0; i < NB; i++)
        add(2, blk(32'h3000_0000, 1, i), blk(32'h3000_0000, 0, i), 0, 0, 50);
    end
  endfunction

  // longest chain of the graph: a task starts after the previous task on each of its
  // addresses has finished
  function automatic int critical_path();
    int cp = 0, st;
    last_t.delete();
    for (int t = 0; t < nt; t++) begin
      st = 0;
      for (int i = 0; i < t_nd[t]; i++)
        if (last_t.exists(t_addr[t][i]) && t_ef[last_t[t_addr[t][i]]] > st)
          st = t_ef[last_t[t_addr[t][i]]];
      t_ef[t] = st + t_cost[t];
      for (int i = 0; i < t_nd[t]; i++) last_t[t_addr[t][i]] = t;
      if (t_ef[t] > cp) cp = t_ef[t];
    end
    return cp;
  endfunction

  function automatic bit may_run(int t);
    for (int e = 0; e < t; e++)
      if (!t_done[e])
        for (int i = 0; i < t_nd[t]; i++)
          for (int j = 0; j < t_nd[e]; j++)
            if (t_addr[t][i] == t_addr[e][j]) return 0;
    return 1;
  endfunction

  // ---------------- scheduler model ----------------
  int ncores = 0, n_done = 0, n_tm_full = 0, t_last_fin = 0;
  int core_task [MAXC], core_left [MAXC];
  bit running = 0;

  always @(posedge clk) if (rst_n && running) begin
    int freec, t;
    if (fin_valid && fin_ready) begin
      fin_valid <= 0;
      t_last_fin = cyc;
    end
    if (disp_valid && disp_ready) begin
      t = int'(disp_tid);
      checks++;
      if (t < 0 || t >= nt || t_disp[t] || disp_info != 16'(t)) begin
        failures++;
        $display("bad dispatch tid %0d info %0d", disp_tid, disp_info);
      end else begin
        t_disp[t] = 1;
        checks++;
        if (!may_run(t)) begin
          failures++;
          $display("task %0d dispatched before an earlier task on a shared address finished", t);
        end
        t_slot[t] = int'(disp_slot);
        freec = -1;
        for (int c = 0; c < ncores; c++) if (core_task[c] < 0 && freec < 0) freec = c;
        core_task[freec] = t;
        core_left[freec] = t_cost[t];
      end
    end
  end

  always @(negedge clk) if (rst_n && running) begin
    int busy;
    busy = 0;
    for (int c = 0; c < ncores; c++) if (core_task[c] >= 0) busy++;
    disp_ready = (busy < ncores);
    for (int c = 0; c < ncores; c++) if (core_task[c] >= 0 && core_left[c] > 0) core_left[c]--;
    if (!fin_valid) begin
      for (int c = 0; c < ncores; c++)
        if (!fin_valid && core_task[c] >= 0 && core_left[c] == 0) begin
          fin_valid = 1; fin_slot = 9'(t_slot[core_task[c]]);
          t_done[core_task[c]] = 1;
          core_task[c] = -1;
          n_done++;
        end
    end
  end

  // ---------------- one run ----------------
  int speedup_x100;

  task automatic run(string name, int nc);
    int work = 0, cp, lb, t0, span, stalls = 0;
    ncores = nc;
    for (int c = 0; c < MAXC; c++) core_task[c] = -1;
    for (int t = 0; t < nt; t++) begin
      t_done[t] = 0; t_disp[t] = 0; work += t_cost[t];
    end
    cp = critical_path();
    lb = (work + nc - 1) / nc;
    if (cp > lb) lb = cp;
    n_done = 0;
    @(negedge clk);
    running = 1;
    t0 = cyc;
    for (int t = 0; t < nt; t++) begin
      sub_valid = 1; sub_tid = 32'(t); sub_info = 16'(t);
      sub_ndeps = 3'(t_nd[t]);
      for (int i = 0; i < MD; i++) sub_addr[i*64 +: 64] = (i < t_nd[t]) ? t_addr[t][i] : 64'h0;
      #3;
      while (!sub_ready) begin
        if (tm_free == 0) stalls++;
        @(negedge clk); #3;
      end
      @(negedge clk);
      sub_valid = 0;
    end
    while (n_done < nt) @(negedge clk);
    repeat (20) @(negedge clk);
    running = 0;
    disp_ready = 0;
    span = t_last_fin - t0;
    speedup_x100 = work * 100 / span;
    n_tm_full += stalls;
    $display("%-8s %2d cores: %4d tasks, work %0d, chain %0d, bound %0d, run %0d cycles, speedup %0d.%02d, TM-full stall cycles %0d",
             name, nc, nt, work, cp, lb, span, speedup_x100 / 100, speedup_x100 % 100, stalls);
    checks += 5;
    if (n_done != nt) failures++;
    if (tm_free != 10'd512) failures++;
    if (vm_free != 12'd2048) failures++;
    if (dm_free != 12'd2048) failures++;
    if (span * 75 > lb * 100) begin
      failures++;
      $display("%s on %0d cores: run %0d cycles exceeds bound %0d / 0.75", name, nc, span, lb);
    end
  endtask

  task automatic bench(string name, int which);
    int s8;
    case (which)
      0: gen_cholesky();
      1: gen_heat();
      default: gen_nbody();
    endcase
    run(name, 8);
    s8 = speedup_x100;
    run(name, 32);
    checks++;
    if (speedup_x100 < s8) begin
      failures++;
      $display("%s: slower on 32 cores than on 8", name);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    bench("Cholesky", 0);
    bench("Heat", 1);
    bench("N-body", 2);
    checks++;
    if (n_tm_full == 0) begin
      failures++;
      $display("the task memory never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
