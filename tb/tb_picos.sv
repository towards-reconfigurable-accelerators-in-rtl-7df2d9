// tb_picos: Picos with a behavioural scheduler of NCORES cores. A producer submits a
// stream of random tasks (0..4 distinct dependence addresses drawn from a small pool, so
// many tasks share addresses); the scheduler takes dispatched tasks, sometimes rejects
// one (it is offered again later), runs each for a random time and reports it finished.
// Checked against a reference model of the dependence rule: a task may be dispatched only
// when every earlier-submitted task sharing one of its addresses has finished; every task
// is dispatched exactly once (plus re-offers after rejects) with its own identifier and
// info word; all tasks complete; all memories are empty at the end. Counted mechanisms
// (each must occur): a dependence that had to wait, a task refused because a memory was
// full, a rejected and re-offered task, a task without dependences.
module tb_picos;
  localparam int TM = 16, DM = 32, WAYS = 4, VM = 32, MD = 4;
  localparam int NTASKS = 1500, NCORES = 6, POOL = 24;
  logic clk = 0, rst_n = 0;
  logic sub_valid = 0, sub_ready;
  logic [31:0] sub_tid = 0;
  logic [15:0] sub_info = 0;
  logic [2:0]  sub_ndeps = 0;
  logic [MD*64-1:0] sub_addr = '0;
  logic disp_valid, disp_ready = 0;
  logic [3:0] disp_slot;
  logic [31:0] disp_tid;
  logic [15:0] disp_info;
  logic rej_valid = 0, rej_ready;
  logic [3:0] rej_slot = 0;
  logic [31:0] rej_tid = 0;
  logic fin_valid = 0, fin_ready;
  logic [3:0] fin_slot = 0;
  logic [4:0] tm_free;
  logic [5:0] vm_free, dm_free;
  int checks = 0, failures = 0;
  int n_wait = 0, n_full = 0, n_rej = 0, n_nodep = 0, n_done = 0, n_disp = 0;
  always #5 clk = !clk;

  picos #(.TM_SIZE(TM), .DM_SIZE(DM), .DM_WAYS(WAYS), .VM_SIZE(VM), .MAX_DEPS(MD)) dut (
    .clk, .rst_n, .sub_valid, .sub_ready, .sub_tid, .sub_info, .sub_ndeps, .sub_addr,
    .disp_valid, .disp_ready, .disp_slot, .disp_tid, .disp_info,
    .rej_valid, .rej_ready, .rej_slot, .rej_tid, .fin_valid, .fin_ready, .fin_slot,
    .tm_free, .vm_free, .dm_free);

  // reference: tasks in submission order
  int          t_nd   [NTASKS];
  logic [63:0] t_addr [NTASKS][MD];
  bit          t_disp [NTASKS], t_done [NTASKS];
  int          t_slot [NTASKS];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("timeout: %0d tasks done", n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit may_run(int t);
    for (int e = 0; e < t; e++)
      if (!t_done[e])
        for (int i = 0; i < t_nd[t]; i++)
          for (int j = 0; j < t_nd[e]; j++)
            if (t_addr[t][i] == t_addr[e][j]) return 0;
    return 1;
  endfunction

  // producer
  initial begin
    for (int t = 0; t < NTASKS; t++) begin
      int nd;
      nd = $urandom_range(0, MD);
      t_nd[t] = nd;
      for (int i = 0; i < nd; i++) begin
        bit dup;
        do begin
          t_addr[t][i] = 64'h8000_0000 + 64'($urandom_range(0, POOL - 1)) * 64;
          dup = 0;
          for (int j = 0; j < i; j++) if (t_addr[t][j] == t_addr[t][i]) dup = 1;
        end while (dup);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NTASKS; t++) begin
      @(negedge clk);
      sub_valid = 1; sub_tid = 32'(t) ^ 32'h5a5a_0000; sub_info = 16'(t * 7);
      sub_ndeps = 3'(t_nd[t]);
      for (int i = 0; i < MD; i++) sub_addr[i*64 +: 64] = (i < t_nd[t]) ? t_addr[t][i] : 64'hdead;
      if (t_nd[t] == 0) n_nodep++;
      @(posedge clk);
      while (!sub_ready) begin
        if (tm_free == 0 || vm_free < 6'(t_nd[t]) || dm_free < 6'(t_nd[t])) n_full++;
        @(posedge clk);
      end
      @(negedge clk);
      sub_valid = 0;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 20)) @(negedge clk);
    end
  end

  // scheduler with NCORES cores
  int core_task [NCORES], core_left [NCORES];
  int pend_rej [$];
  initial for (int c = 0; c < NCORES; c++) core_task[c] = -1;

  always @(posedge clk) if (rst_n) begin
    int t, freec;
    // finishes: one per cycle
    if (fin_valid && fin_ready) fin_valid <= 0;
    // dispatch observed
    if (disp_valid && disp_ready) begin
      t = int'(disp_tid ^ 32'h5a5a_0000);
      checks++;
      if (t < 0 || t >= NTASKS || t_done[t] || disp_info != 16'(t * 7)) begin
        failures++;
        $display("bad dispatch tid %h info %h", disp_tid, disp_info);
      end else begin
        checks++;
        if (!may_run(t)) begin
          failures++;
          $display("task %0d dispatched before an earlier task on a shared address finished", t);
        end
        if (t_disp[t] == 0 && t_nd[t] > 0 && !may_run_at_submit(t)) n_wait++;
        t_slot[t] = int'(disp_slot);
        if (rejecting) begin
          pend_rej.push_back(t);
          n_rej++;
        end else begin
          freec = -1;
          for (int c = 0; c < NCORES; c++) if (core_task[c] < 0 && freec < 0) freec = c;
          core_task[freec] = t;
          core_left[freec] = $urandom_range(1, 30);
          t_disp[t] = 1;
          n_disp++;
        end
      end
    end
  end

  // cores count down; a finished core reports through fin_*
  bit rejecting;
  int fin_core;
  always @(negedge clk) begin
    int busy;
    busy = 0;
    for (int c = 0; c < NCORES; c++) if (core_task[c] >= 0) busy++;
    rejecting  = ($urandom_range(0, 19) == 0) && (pend_rej.size() == 0);
    disp_ready = (busy < NCORES);
    // hand a rejected task back
    if (rej_valid && rej_ready) rej_valid = 0;
    if (!rej_valid && pend_rej.size() > 0) begin
      int t;
      t = pend_rej.pop_front();
      rej_valid = 1; rej_slot = 4'(t_slot[t]); rej_tid = 32'(t) ^ 32'h5a5a_0000;
    end
    for (int c = 0; c < NCORES; c++) if (core_task[c] >= 0 && core_left[c] > 0) core_left[c]--;
    if (!fin_valid) begin
      for (int c = 0; c < NCORES; c++)
        if (!fin_valid && core_task[c] >= 0 && core_left[c] == 0) begin
          fin_valid = 1; fin_slot = 4'(t_slot[core_task[c]]);
          t_done[core_task[c]] = 1;     // the model retires it as it is reported
          core_task[c] = -1;
          n_done++;
        end
    end
  end

  // a task "waits" if an earlier task shared an address and was still unfinished when
  // the later one arrived (recorded at submission)
  bit t_waited [NTASKS];
  function automatic bit may_run_at_submit(int t);
    return !t_waited[t];
  endfunction
  always @(posedge clk) if (sub_valid && sub_ready) begin
    int t;
    t = int'(sub_tid ^ 32'h5a5a_0000);
    t_waited[t] = !may_run(t);
  end

  initial begin
    wait (n_done == NTASKS);
    repeat (50) @(posedge clk);
    checks += 4;
    if (tm_free != 5'(TM)) failures++;
    if (vm_free != 6'(VM)) failures++;
    if (dm_free != 6'(DM)) failures++;
    if (n_disp != NTASKS) failures++;
    $display("tasks %0d, waited %0d, memory-full stalls %0d, rejects %0d, no-dependence %0d",
             n_done, n_wait, n_full, n_rej, n_nodep);
    checks += 4;
    if (n_wait == 0) failures++;
    if (n_full == 0) failures++;
    if (n_rej == 0) failures++;
    if (n_nodep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
