// tb_picos_rtd: drives the Ready Task Dispatcher with ready tasks and rejects while the
// scheduler side stalls at random. The task info memory is a real memory cell that the
// testbench fills. Checks: tasks leave in queue order (ready and rejected tasks
// interleaved as they were queued) with the right identifier and info word; a rejected
// task is offered again; a waiting dispatch holds still; back-to-back dispatch reaches one
// task per cycle.
module tb_picos_rtd;
  localparam int TM = 16;
  logic clk = 0, rst_n = 0;
  logic rdy_valid = 0, rdy_ready, rej_valid = 0, rej_ready;
  logic [3:0] rdy_slot = 0, rej_slot = 0, disp_slot;
  logic [31:0] rdy_tid = 0, rej_tid = 0, disp_tid;
  logic disp_valid, disp_ready = 0;
  logic [15:0] disp_info;
  logic info_re, info_we = 0;
  logic [3:0] info_raddr, info_waddr = 0;
  logic [15:0] info_rdata, info_wdata = 0;
  int checks = 0, failures = 0, n_disp = 0, n_rej = 0, best_run = 0, run = 0;
  int q_slot [$], q_tid [$];
  logic [15:0] info_model [TM];
  bit stall_mode;
  always #5 clk = !clk;

  picos_rtd #(.TM_SIZE(TM)) dut (.clk, .rst_n, .rdy_valid, .rdy_ready, .rdy_slot, .rdy_tid,
    .rej_valid, .rej_ready, .rej_slot, .rej_tid, .disp_valid, .disp_ready, .disp_slot,
    .disp_tid, .disp_info, .info_re, .info_raddr, .info_rdata);
  efpga_mem_2kx16 #(.DEPTH(TM), .WIDTH(16)) u_mem (.clk, .we(info_we), .waddr(info_waddr),
    .wdata(info_wdata), .re(info_re), .raddr(info_raddr), .rdata(info_rdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scheduler: takes dispatches, rejects some of them
  logic [3:0]  held_slot;
  logic [31:0] held_tid;
  bit          held_chk;
  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      // a dispatch that was not taken must not change
      if (held_chk) begin
        checks++;
        if (!disp_valid || disp_slot != held_slot || disp_tid != held_tid) failures++;
      end
      held_chk = disp_valid && !disp_ready;
      held_slot = disp_slot; held_tid = disp_tid;
      if (disp_valid && disp_ready) begin
        checks += 3;
        if (q_slot.size() == 0) failures += 3;
        else begin
          int s, t;
          s = q_slot.pop_front(); t = q_tid.pop_front();
          if (int'(disp_slot) != s) failures++;
          if (disp_tid != 32'(t)) failures++;
          if (disp_info != info_model[disp_slot]) failures++;
        end
        n_disp++;
        run++;
        if (run > best_run) best_run = run;
      end else run = 0;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int i = 0; i < TM; i++) begin
      @(negedge clk);
      info_we = 1; info_waddr = 4'(i); info_wdata = 16'($urandom);
      info_model[i] = info_wdata;
    end
    @(negedge clk);
    info_we = 0;
    rst_n = 1;
    for (int round = 0; round < 200; round++) begin
      int n;
      stall_mode = (round % 2);
      n = $urandom_range(1, TM);
      // queue n ready tasks
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        disp_ready = stall_mode ? $urandom_range(0, 1) : 1'b0;
        rdy_valid = 1; rdy_slot = 4'(i); rdy_tid = $urandom;
        #1;
        while (!rdy_ready) begin @(negedge clk); #1; end
        q_slot.push_back(i); q_tid.push_back(int'(rdy_tid));
      end
      @(negedge clk);
      rdy_valid = 0;
      // drain, rejecting some
      while (q_slot.size() > 0 || disp_valid) begin
        disp_ready = stall_mode ? $urandom_range(0, 1) : 1'b1;
        #1;
        if (stall_mode && disp_valid && disp_ready && $urandom_range(0, 4) == 0) begin
          // reject: hand it back in the next cycle
          automatic logic [3:0] s = disp_slot;
          automatic logic [31:0] t = disp_tid;
          @(negedge clk);
          disp_ready = 0;
          rej_valid = 1; rej_slot = s; rej_tid = t;
          q_slot.push_back(int'(s)); q_tid.push_back(int'(t));
          #1;
          while (!rej_ready) begin @(negedge clk); #1; end
          @(negedge clk);
          rej_valid = 0;
          n_rej++;
        end else @(negedge clk);
      end
      disp_ready = 0;
    end
    $display("dispatched %0d, rejected %0d, longest back-to-back run %0d", n_disp, n_rej, best_run);
    checks += 2;
    if (n_rej == 0) failures++;
    if (best_run < 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
