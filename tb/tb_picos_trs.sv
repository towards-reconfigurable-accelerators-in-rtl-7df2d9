// tb_picos_trs: drives the Task Reservation Station directly (TM of 8 slots). Random
// tasks are created, their dependences are reported by notifications (stored VM index,
// ready now or later, in random order), finished tasks are reported back, and the ready
// and release outputs stall at random. Checks: the slot handed out is free; a task is
// sent to the RTD exactly when its last pending dependence becomes ready (at once if it
// has none), with its identifier; a finish sends a release bundle with the task's
// dependence count and exactly the VM indices reported for it; the free-slot count.
module tb_picos_trs;
  localparam int TM = 8, VM = 16, MD = 4;
  logic clk = 0, rst_n = 0;
  logic nt_valid = 0, nt_ready;
  logic [31:0] nt_tid = 0;
  logic [2:0] nt_ndeps = 0;
  logic [2:0] nt_slot;
  logic [3:0] tm_free;
  logic ntf_valid = 0, ntf_ready, ntf_write_vm = 0, ntf_is_ready = 0;
  logic [2:0] ntf_slot = 0;
  logic [1:0] ntf_dep = 0;
  logic [3:0] ntf_vm = 0;
  logic fin_valid = 0, fin_ready;
  logic [2:0] fin_slot = 0;
  logic rel_valid, rel_ready = 1;
  logic [2:0] rel_count;
  logic [MD*4-1:0] rel_vm;
  logic rdy_valid, rdy_ready = 1;
  logic [2:0] rdy_slot;
  logic [31:0] rdy_tid;
  int checks = 0, failures = 0, n_ready = 0, n_rel = 0;
  always #5 clk = !clk;

  picos_trs #(.TM_SIZE(TM), .VM_SIZE(VM), .MAX_DEPS(MD)) dut (
    .clk, .rst_n, .nt_valid, .nt_ready, .nt_tid, .nt_ndeps, .nt_slot, .tm_free,
    .ntf_valid, .ntf_ready, .ntf_slot, .ntf_dep, .ntf_vm, .ntf_write_vm, .ntf_is_ready,
    .fin_valid, .fin_ready, .fin_slot, .rel_valid, .rel_ready, .rel_count, .rel_vm,
    .rdy_valid, .rdy_ready, .rdy_slot, .rdy_tid);

  // model per slot
  bit      busy [TM];
  int      tid [TM], nd [TM], pend [TM], vms [TM][MD];
  bit      stored [TM][MD], readyd [TM][MD];
  bit      is_ready [TM];
  int      exp_rdy_slot [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    rdy_ready <= ($urandom_range(0, 3) != 0);
    rel_ready <= ($urandom_range(0, 3) != 0);
  end

  // ready tasks leaving, observed mid-cycle (handshake completes at the next edge)
  always @(negedge clk) begin
    #2;
    if (rst_n && rdy_valid && rdy_ready) begin
      checks++;
      if (exp_rdy_slot.size() == 0 || int'(rdy_slot) != exp_rdy_slot[0] ||
          rdy_tid != 32'(tid[rdy_slot])) begin
        failures++;
        $display("ready slot %0d tid %h unexpected", rdy_slot, rdy_tid);
      end
      if (exp_rdy_slot.size() > 0) void'(exp_rdy_slot.pop_front());
      n_ready++;
    end
  end

  task automatic wait_hs(ref logic v, ref logic r);
    #1;
    while (!r) begin @(negedge clk); #1; end
    @(negedge clk);
    v = 0;
  endtask

  task automatic new_task();
    int s, n;
    @(negedge clk);
    n = $urandom_range(0, MD);
    nt_valid = 1; nt_tid = $urandom; nt_ndeps = 3'(n);
    #1;
    while (!nt_ready) begin @(negedge clk); #1; end
    s = int'(nt_slot);
    checks++;
    if (busy[s]) begin failures++; $display("slot %0d handed out twice", s); end
    busy[s] = 1; tid[s] = int'(nt_tid); nd[s] = n; pend[s] = n; is_ready[s] = (n == 0);
    for (int d = 0; d < MD; d++) begin stored[s][d] = 0; readyd[s][d] = 0; end
    if (n == 0) exp_rdy_slot.push_back(s);
    @(negedge clk);
    nt_valid = 0;
  endtask

  task automatic notify(int s, int d, bit wr, bit rd);
    @(negedge clk);
    ntf_valid = 1; ntf_slot = 3'(s); ntf_dep = 2'(d); ntf_write_vm = wr; ntf_is_ready = rd;
    ntf_vm = 4'($urandom);
    if (wr) begin vms[s][d] = int'(ntf_vm); stored[s][d] = 1; end
    if (rd) begin
      readyd[s][d] = 1;
      pend[s]--;
      if (pend[s] == 0) begin is_ready[s] = 1; exp_rdy_slot.push_back(s); end
    end
    wait_hs(ntf_valid, ntf_ready);
  endtask

  task automatic finish(int s);
    @(negedge clk);
    fin_valid = 1; fin_slot = 3'(s);
    #1;
    while (!fin_ready) begin @(negedge clk); #1; end
    checks++;
    if (!rel_valid || int'(rel_count) != nd[s]) begin
      failures++; $display("release count %0d expected %0d", rel_count, nd[s]);
    end
    for (int d = 0; d < nd[s]; d++) begin
      checks++;
      if (int'(rel_vm[d*4 +: 4]) != vms[s][d]) failures++;
    end
    n_rel++;
    busy[s] = 0;
    @(negedge clk);
    fin_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int nb, op, s, d, cands [$];
      nb = 0;
      for (int i = 0; i < TM; i++) if (busy[i]) nb++;
      checks++;
      if (int'(tm_free) != TM - nb) failures++;
      op = $urandom_range(0, 2);
      if (op == 0 && nb < TM) new_task();
      else if (op == 1) begin
        // some dependence still to be stored or made ready
        cands = {};
        for (int i = 0; i < TM; i++)
          if (busy[i]) for (int k = 0; k < nd[i]; k++)
            if (!stored[i][k] || !readyd[i][k]) cands.push_back(i * MD + k);
        if (cands.size() > 0) begin
          int c;
          c = cands[$urandom_range(0, cands.size() - 1)];
          s = c / MD; d = c % MD;
          if (!stored[s][d]) notify(s, d, 1, $urandom_range(0, 1));
          else notify(s, d, 0, 1);
        end
      end else begin
        cands = {};
        for (int i = 0; i < TM; i++)
          if (busy[i] && is_ready[i] && !exp_rdy_slot_has(i)) cands.push_back(i);
        if (cands.size() > 0) finish(cands[$urandom_range(0, cands.size() - 1)]);
      end
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_rdy_slot.size() != 0) failures++;
    $display("ready %0d, released %0d", n_ready, n_rel);
    checks++;
    if (n_ready < 100 || n_rel < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit exp_rdy_slot_has(int s);
    foreach (exp_rdy_slot[i]) if (exp_rdy_slot[i] == s) return 1;
    return 0;
  endfunction
endmodule
