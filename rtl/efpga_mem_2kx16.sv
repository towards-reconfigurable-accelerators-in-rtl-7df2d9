// efpga_mem_2kx16: model of one eFPGA memory cell, configured as DEPTH words of WIDTH bits
// (2048 x 16 in the tile). One synchronous write port and one synchronous read port: a
// read address presented in cycle n returns its word in cycle n+1. A read and a write to the
// same address in the same cycle return the old word. Contents are not reset; a word must be
// written before it is read. In Picos the cell serves as the task info memory, indexed by
// task memory slot. The read-during-write behaviour is this design's choice.
module efpga_mem_2kx16 #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
