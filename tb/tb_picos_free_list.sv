// tb_picos_free_list: random allocations and releases, alone and in the same cycle, on a
// 12-entry list (not a power of two) and on a 512-entry list. A reference set of the
// allocated slots checks that every handed-out slot is free, that count and alloc_valid
// match the number of free slots, and that a full list refuses allocations.
module tb_picos_free_list;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic a_alloc = 0, a_rel = 0, a_valid;
  logic [3:0] a_idx, a_ridx = 0;
  logic [4:0] a_count;
  logic b_alloc = 0, b_rel = 0, b_valid;
  logic [8:0] b_idx, b_ridx = 0;
  logic [9:0] b_count;

  picos_free_list #(.N(12)) u_a (.clk, .rst_n, .alloc_valid(a_valid), .alloc_idx(a_idx),
    .alloc(a_alloc), .release_en(a_rel), .release_idx(a_ridx), .count(a_count));
  picos_free_list #(.N(512)) u_b (.clk, .rst_n, .alloc_valid(b_valid), .alloc_idx(b_idx),
    .alloc(b_alloc), .release_en(b_rel), .release_idx(b_ridx), .count(b_count));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit used_a [12], used_b [512];
  int n_a = 0, n_b = 0, full_a = 0, both_a = 0;

  // pick a random allocated slot, or -1
  function automatic int pick_a();
    int c [$];
    for (int i = 0; i < 12; i++) if (used_a[i]) c.push_back(i);
    return (c.size() == 0) ? -1 : c[$urandom_range(0, c.size() - 1)];
  endfunction
  function automatic int pick_b();
    int c [$];
    for (int i = 0; i < 512; i++) if (used_b[i]) c.push_back(i);
    return (c.size() == 0) ? -1 : c[$urandom_range(0, c.size() - 1)];
  endfunction

  initial begin
    int r, bias;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      bias = (cyc / 2000) % 2;   // phases that fill and that drain the lists
      // outputs against the reference
      checks += 4;
      if (int'(a_count) != 12 - n_a) failures++;
      if (a_valid != (n_a < 12)) failures++;
      if (int'(b_count) != 512 - n_b) failures++;
      if (b_valid != (n_b < 512)) failures++;
      if (a_valid) begin
        checks++;
        if (used_a[a_idx] || a_idx >= 12) begin failures++; $display("slot %0d handed out twice", a_idx); end
      end else full_a++;
      if (b_valid) begin
        checks++;
        if (used_b[b_idx]) begin failures++; $display("slot %0d handed out twice", b_idx); end
      end
      // next requests
      a_alloc = $urandom_range(0, 9) < (bias ? 3 : 7);
      r = pick_a();
      a_rel = (r >= 0) && ($urandom_range(0, 9) < (bias ? 7 : 3));
      if (a_rel) a_ridx = 4'(r);
      b_alloc = $urandom_range(0, 9) < (bias ? 3 : 8);
      r = pick_b();
      b_rel = (r >= 0) && ($urandom_range(0, 9) < (bias ? 8 : 2));
      if (b_rel) b_ridx = 9'(r);
      // reference update for the coming edge
      if (a_alloc && a_valid && a_rel) both_a++;
      if (a_rel) begin used_a[a_ridx] = 0; n_a--; end
      if (a_alloc && a_valid) begin used_a[a_idx] = 1; n_a++; end
      if (b_rel) begin used_b[b_ridx] = 0; n_b--; end
      if (b_alloc && b_valid) begin used_b[b_idx] = 1; n_b++; end
    end
    @(negedge clk);
    a_alloc = 0; a_rel = 0; b_alloc = 0; b_rel = 0;
    $display("list full %0d cycles, allocation and release together %0d times", full_a, both_a);
    checks += 2;
    if (full_a == 0) failures++;
    if (both_a == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
