// tb_picos_dct: drives the Dependence Chain Tracker directly with a small configuration
// (DM 16 entries in 4 sets of 4 ways, VM 16). New dependences on a pool of addresses and
// release bundles of chain heads are issued in random order while the notification output
// stalls at random. A reference model keeps one chain per address and predicts every
// notification (ready on a new address, waiting on a known one, successor woken on a
// release) and the free-entry counts. A directed part fills one DM set and checks that a
// fifth address mapping to it waits until a release frees a way.
module tb_picos_dct;
  localparam int DM = 16, WAYS = 4, VM = 16, TM = 16, MD = 4;
  logic clk = 0, rst_n = 0;
  logic dep_valid = 0, dep_ready;
  logic [63:0] dep_addr = 0;
  logic [3:0] dep_slot = 0;
  logic [1:0] dep_idx = 0;
  logic rel_valid = 0, rel_ready;
  logic [2:0] rel_count = 0;
  logic [MD*4-1:0] rel_vm = 0;
  logic ntf_valid, ntf_ready = 1, ntf_write_vm, ntf_is_ready;
  logic [3:0] ntf_slot, ntf_vm;
  logic [1:0] ntf_dep;
  logic [4:0] vm_free, dm_free;
  int checks = 0, failures = 0, set_full_stall = 0, woken = 0, waited = 0;
  always #5 clk = !clk;

  picos_dct #(.DM_SIZE(DM), .DM_WAYS(WAYS), .VM_SIZE(VM), .TM_SIZE(TM), .MAX_DEPS(MD)) dut (
    .clk, .rst_n, .dep_valid, .dep_ready, .dep_addr, .dep_slot, .dep_idx,
    .rel_valid, .rel_ready, .rel_count, .rel_vm,
    .ntf_valid, .ntf_ready, .ntf_slot, .ntf_dep, .ntf_vm, .ntf_write_vm, .ntf_is_ready,
    .vm_free, .dm_free);

  // model
  int chain [int][$];          // address index -> VM indices, head first
  int vm_addr [VM], vm_slot [VM], vm_dep [VM];
  int exp_slot [$], exp_dep [$], exp_vm [$];   // expected release notifications

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) ntf_ready <= ($urandom_range(0, 3) != 0);

  function automatic int live_addrs();
    int n = 0;
    foreach (chain[a]) if (chain[a].size() > 0) n++;
    return n;
  endfunction
  function automatic int live_vms();
    int n = 0;
    foreach (chain[a]) n += chain[a].size();
    return n;
  endfunction

  // notifications caused by releases
  // sampled in the middle of the cycle; the handshake completes at the next rising edge
  always @(negedge clk) begin
    #2;
    if (rst_n && ntf_valid && ntf_ready && rel_valid) begin
    checks++;
    if (exp_slot.size() == 0) failures++;
    else begin
      int e [3];
      e[0] = exp_slot.pop_front(); e[1] = exp_dep.pop_front(); e[2] = exp_vm.pop_front();
      if (ntf_write_vm || !ntf_is_ready || int'(ntf_slot) != e[0] || int'(ntf_dep) != e[1] ||
          int'(ntf_vm) != e[2]) begin
        failures++;
        $display("release notification slot %0d dep %0d vm %0d, expected %0d %0d %0d",
                 ntf_slot, ntf_dep, ntf_vm, e[0], e[1], e[2]);
      end
      woken++;
    end
    end
  end

  task automatic new_dep(int a, int slot, int d);
    bit expect_ready;
    @(negedge clk);
    dep_valid = 1; dep_addr = 64'h1000 + 64'(a) * 8; dep_slot = 4'(slot); dep_idx = 2'(d);
    expect_ready = !chain.exists(a) || chain[a].size() == 0;
    #1;
    while (!dep_ready) begin
      if (ntf_ready) set_full_stall++;
      @(negedge clk);
      #1;
    end
    checks++;
    if (!ntf_valid || !ntf_ready || !ntf_write_vm || ntf_is_ready != expect_ready ||
        int'(ntf_slot) != slot || int'(ntf_dep) != d) begin
      failures++;
      $display("dep notification wrong for address %0d", a);
    end
    if (!expect_ready) waited++;
    begin
      int q [$];
      if (chain.exists(a)) q = chain[a];
      q.push_back(int'(ntf_vm));
      chain[a] = q;
    end
    vm_addr[ntf_vm] = a; vm_slot[ntf_vm] = slot; vm_dep[ntf_vm] = d;
    @(negedge clk);
    dep_valid = 0;
  endtask

  task automatic do_release(int addrs [$]);
    @(negedge clk);
    rel_count = 3'(addrs.size());
    foreach (addrs[i]) begin
      int v;
      int q [$];
      q = chain[addrs[i]];
      v = q.pop_front();
      chain[addrs[i]] = q;
      rel_vm[i*4 +: 4] = 4'(v);
      if (chain[addrs[i]].size() > 0) begin
        int s;
        s = chain[addrs[i]][0];
        exp_slot.push_back(vm_slot[s]); exp_dep.push_back(vm_dep[s]); exp_vm.push_back(s);
      end
    end
    rel_valid = 1;
    #1;
    while (!rel_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    rel_valid = 0;
    checks += 3;
    if (exp_slot.size() != 0) failures++;
    if (int'(vm_free) != VM - live_vms()) failures++;
    if (int'(dm_free) != DM - live_addrs()) failures++;
  endtask

  initial begin
    int slot;
    slot = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      if (live_vms() < VM - 1 && live_addrs() < 10 && $urandom_range(0, 1)) begin
        int a;
        a = $urandom_range(0, 11);
        new_dep(a, slot, $urandom_range(0, 3));
        slot = (slot + 1) % TM;
        checks += 2;
        if (int'(vm_free) != VM - live_vms()) failures++;
        if (int'(dm_free) != DM - live_addrs()) failures++;
      end else begin
        int heads [$];
        heads = {};
        foreach (chain[a]) if (chain[a].size() > 0 && heads.size() < $urandom_range(0, 4)) heads.push_back(a);
        do_release(heads);
      end
    end
    // drain
    forever begin
      int heads [$];
      heads = {};
      foreach (chain[a]) if (chain[a].size() > 0 && heads.size() < 4) heads.push_back(a);
      if (heads.size() == 0) break;
      do_release(heads);
    end
    // directed: five addresses in one set of four ways
    begin
      int same [$];
      for (int a = 100; same.size() < 5; a++) begin
        logic [63:0] x;
        logic [1:0]  h;
        x = 64'h1000 + 64'(a) * 8;
        h = '0;
        for (int i = 0; i < 64; i += 2) h ^= x[i +: 2];
        if (h == 2'd1) same.push_back(a);
      end
      for (int i = 0; i < 4; i++) new_dep(same[i], i, 0);
      fork
        new_dep(same[4], 4, 0);
        begin repeat (10) @(posedge clk); do_release('{same[0]}); end
      join
      checks++;
      if (set_full_stall < 5) failures++;
    end
    $display("woken %0d, waited %0d, set-full stall cycles %0d", woken, waited, set_full_stall);
    checks++;
    if (woken == 0 || waited == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
