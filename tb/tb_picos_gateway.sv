// tb_picos_gateway: drives the gateway with random tasks while the testbench plays TRS
// (random acceptance, random slot numbers), DCT (random acceptance) and the free-entry
// counters. Checks: a task is accepted only when the VM and DM counters cover its
// dependence count; the TRS sees identifier and count; the info word is written at the
// returned slot; the dependences reach the DCT in order with slot, index and address; with
// nothing stalling a task with n dependences takes 1 + n cycles.
module tb_picos_gateway;
  localparam int MD = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [31:0] in_tid = 0;
  logic [15:0] in_info = 0;
  logic [2:0] in_ndeps = 0;
  logic [MD*64-1:0] in_addr = '0;
  logic nt_valid, nt_ready = 0;
  logic [31:0] nt_tid;
  logic [2:0] nt_ndeps;
  logic [8:0] nt_slot = 0;
  logic info_we;
  logic [8:0] info_waddr;
  logic [15:0] info_wdata;
  logic dep_valid, dep_ready = 0;
  logic [63:0] dep_addr;
  logic [8:0] dep_slot;
  logic [1:0] dep_idx;
  logic [11:0] vm_free = 12'd2048, dm_free = 12'd2048;
  int checks = 0, failures = 0, refused = 0, cycle = 0;
  bit stalls;
  always #5 clk = !clk;
  always @(posedge clk) cycle++;

  picos_gateway dut (.clk, .rst_n, .in_valid, .in_ready, .in_tid, .in_info, .in_ndeps, .in_addr,
    .nt_valid, .nt_ready, .nt_tid, .nt_ndeps, .nt_slot, .info_we, .info_waddr, .info_wdata,
    .dep_valid, .dep_ready, .dep_addr, .dep_slot, .dep_idx, .vm_free, .dm_free);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected dependences
  logic [63:0] e_addr [$];
  int          e_slot [$], e_idx [$];

  always @(negedge clk) begin
    nt_ready  <= stalls ? $urandom_range(0, 1) : 1'b1;
    dep_ready <= stalls ? $urandom_range(0, 1) : 1'b1;
    nt_slot   <= 9'($urandom);
  end

  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        checks += 4;
        if (!nt_valid || nt_tid != in_tid || nt_ndeps != in_ndeps) failures++;
        if (!info_we || info_waddr != nt_slot || info_wdata != in_info) failures++;
        if (vm_free < 12'(in_ndeps)) failures++;
        if (dm_free < 12'(in_ndeps)) failures++;
        for (int i = 0; i < int'(in_ndeps); i++) begin
          e_addr.push_back(in_addr[i*64 +: 64]); e_slot.push_back(int'(nt_slot)); e_idx.push_back(i);
        end
      end
      if (dep_valid && dep_ready) begin
        checks++;
        if (e_addr.size() == 0) failures++;
        else if (dep_addr != e_addr.pop_front() || int'(dep_slot) != e_slot.pop_front() ||
                 int'(dep_idx) != e_idx.pop_front()) failures++;
      end
      if (info_we && !(in_valid && in_ready)) begin checks++; failures++; end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      int n, c0;
      stalls = (t >= 300);
      n = $urandom_range(0, MD);
      @(negedge clk);
      // occasionally too little room: the task must wait until room appears
      if (t >= 300 && $urandom_range(0, 5) == 0) begin
        if ($urandom_range(0, 1)) vm_free = 12'($urandom_range(0, 3)); else dm_free = 12'($urandom_range(0, 3));
      end
      in_valid = 1; in_tid = $urandom; in_info = 16'($urandom); in_ndeps = 3'(n);
      for (int i = 0; i < MD; i++) in_addr[i*64 +: 64] = {$urandom, $urandom};
      c0 = cycle;
      #1;
      while (!in_ready) begin
        if (vm_free < 12'(n) || dm_free < 12'(n)) begin
          refused++;
          if ($urandom_range(0, 3) == 0) begin vm_free = 12'd2048; dm_free = 12'd2048; end
        end
        @(negedge clk); #1;
      end
      @(negedge clk);
      in_valid = 0;
      while (dut.state != dut.S_IDLE) @(negedge clk);
      if (!stalls) begin
        checks++;
        if (cycle - c0 != 1 + n) begin
          failures++; $display("task with %0d dependences took %0d cycles", n, cycle - c0);
        end
      end
    end
    repeat (4) @(negedge clk);
    checks += 2;
    if (e_addr.size() != 0) failures++;
    if (refused == 0) failures++;
    $display("refused for lack of room in %0d cycles", refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
