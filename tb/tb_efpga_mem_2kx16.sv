// tb_efpga_mem_2kx16: writes random words to random addresses of the full 2048 x 16 cell,
// reads them back and checks the one-cycle read latency and read-old-data when a read and
// a write hit the same address in one cycle.
module tb_efpga_mem_2kx16;
  logic clk = 0, we = 0, re = 0;
  logic [10:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [2048];
  bit          written [2048];
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  efpga_mem_2kx16 dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_q;
    logic        chk_q;
    chk_q = 0; exp_q = 0;
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      we = 1; waddr = 11'(i); wdata = 16'($urandom);
      model[i] = wdata; written[i] = 1;
    end
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      if (chk_q) begin
        checks++;
        if (rdata !== exp_q) begin
          failures++;
          if (failures < 5) $display("read mismatch: got %h expected %h", rdata, exp_q);
        end
      end
      re    = $urandom_range(0, 1);
      raddr = 11'($urandom);
      we    = $urandom_range(0, 1);
      waddr = (i % 7 == 0) ? raddr : 11'($urandom);
      wdata = 16'($urandom);
      chk_q = re;
      exp_q = model[raddr];          // old data on a same-address write
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
