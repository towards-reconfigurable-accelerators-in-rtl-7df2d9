// picos: hardware task dependence manager. Software (or a producer in hardware) submits
// tasks with up to MAX_DEPS dependence addresses; Picos finds which tasks touch the same
// addresses, orders them in submission order per address, and hands each task to the
// external scheduler once every earlier task on each of its addresses has finished.
//
// Units and the flow of a task:
//   gateway -> TRS (slot in the Task Memory) + task info memory (info word)
//   gateway -> DCT, one dependence per cycle (Dependence Memory lookup, Version chain)
//   DCT -> TRS notifications (dependence stored / dependence ready)
//   TRS -> RTD when no dependence is pending; RTD -> scheduler (dispatch)
//   scheduler -> TRS finish; TRS -> release queue -> DCT, which wakes the next version
//   scheduler -> RTD reject: the task is queued again
// A task with n dependences holds one TM slot, n VM entries and 0..n DM entries. New tasks
// are refused while the memories cannot hold them. The info memory is one 2048 x 16
// eFPGA memory cell. Default sizes: TM 512, DM 2048 (8-way), VM 2048, 4 dependences.
module picos #(
  parameter int unsigned TM_SIZE  = picos_pkg::TM_SIZE_DEF,
  parameter int unsigned DM_SIZE  = picos_pkg::DM_SIZE_DEF,
  parameter int unsigned DM_WAYS  = picos_pkg::DM_WAYS_DEF,
  parameter int unsigned VM_SIZE  = picos_pkg::VM_SIZE_DEF,
  parameter int unsigned MAX_DEPS = picos_pkg::MAX_DEPS_DEF,
  localparam int unsigned AW = picos_pkg::ADDR_W,
  localparam int unsigned TW = picos_pkg::TID_W,
  localparam int unsigned IW = picos_pkg::INFO_W,
  localparam int unsigned SW = $clog2(TM_SIZE),
  localparam int unsigned DW = $clog2(MAX_DEPS),
  localparam int unsigned VW = $clog2(VM_SIZE),
  localparam int unsigned MW = $clog2(DM_SIZE),
  localparam int unsigned NW = $clog2(MAX_DEPS + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // task submission
  input  logic                   sub_valid,
  output logic                   sub_ready,
  input  logic [TW-1:0]          sub_tid,
  input  logic [IW-1:0]          sub_info,
  input  logic [NW-1:0]          sub_ndeps,
  input  logic [MAX_DEPS*AW-1:0] sub_addr,
  // ready task dispatch
  output logic                   disp_valid,
  input  logic                   disp_ready,
  output logic [SW-1:0]          disp_slot,
  output logic [TW-1:0]          disp_tid,
  output logic [IW-1:0]          disp_info,
  // reject (retry later)
  input  logic                   rej_valid,
  output logic                   rej_ready,
  input  logic [SW-1:0]          rej_slot,
  input  logic [TW-1:0]          rej_tid,
  // finished task
  input  logic                   fin_valid,
  output logic                   fin_ready,
  input  logic [SW-1:0]          fin_slot,
  // occupancy
  output logic [SW:0]            tm_free,
  output logic [VW:0]            vm_free,
  output logic [MW:0]            dm_free
);
  localparam int unsigned RW = NW + MAX_DEPS * VW;

  // gateway <-> TRS
  logic          nt_valid, nt_ready;
  logic [TW-1:0] nt_tid;
  logic [NW-1:0] nt_ndeps;
  logic [SW-1:0] nt_slot;
  // gateway -> DCT
  logic          dep_valid, dep_ready;
  logic [AW-1:0] dep_addr;
  logic [SW-1:0] dep_slot;
  logic [DW-1:0] dep_idx;
  // DCT -> TRS
  logic          ntf_valid, ntf_ready, ntf_write_vm, ntf_is_ready;
  logic [SW-1:0] ntf_slot;
  logic [DW-1:0] ntf_dep;
  logic [VW-1:0] ntf_vm;
  // TRS -> release queue -> DCT
  logic          trel_valid, trel_ready, drel_valid, drel_ready;
  logic [RW-1:0] trel_data, drel_data;
  // TRS -> RTD
  logic          rdy_valid, rdy_ready;
  logic [SW-1:0] rdy_slot;
  logic [TW-1:0] rdy_tid;
  // task info memory
  logic          info_we, info_re;
  logic [SW-1:0] info_waddr, info_raddr;
  logic [IW-1:0] info_wdata, info_rdata;
  logic [NW-1:0]          trel_count;
  logic [MAX_DEPS*VW-1:0] trel_vm;

  picos_gateway #(.TM_SIZE(TM_SIZE), .DM_SIZE(DM_SIZE), .VM_SIZE(VM_SIZE), .MAX_DEPS(MAX_DEPS)) u_gw (
    .clk, .rst_n,
    .in_valid(sub_valid), .in_ready(sub_ready), .in_tid(sub_tid), .in_info(sub_info),
    .in_ndeps(sub_ndeps), .in_addr(sub_addr),
    .nt_valid, .nt_ready, .nt_tid, .nt_ndeps, .nt_slot,
    .info_we, .info_waddr, .info_wdata,
    .dep_valid, .dep_ready, .dep_addr, .dep_slot, .dep_idx,
    .vm_free, .dm_free
  );

  picos_trs #(.TM_SIZE(TM_SIZE), .VM_SIZE(VM_SIZE), .MAX_DEPS(MAX_DEPS)) u_trs (
    .clk, .rst_n,
    .nt_valid, .nt_ready, .nt_tid, .nt_ndeps, .nt_slot, .tm_free,
    .ntf_valid, .ntf_ready, .ntf_slot, .ntf_dep, .ntf_vm, .ntf_write_vm, .ntf_is_ready,
    .fin_valid, .fin_ready, .fin_slot,
    .rel_valid(trel_valid), .rel_ready(trel_ready), .rel_count(trel_count), .rel_vm(trel_vm),
    .rdy_valid, .rdy_ready, .rdy_slot, .rdy_tid
  );

  assign trel_data = {trel_count, trel_vm};

  // release bundles wait here so a finish never waits for the DCT
  picos_fifo #(.WIDTH(RW), .DEPTH(4)) u_rel_q (
    .clk, .rst_n,
    .in_valid(trel_valid), .in_ready(trel_ready), .in_data(trel_data),
    .out_valid(drel_valid), .out_ready(drel_ready), .out_data(drel_data), .free()
  );

  picos_dct #(.DM_SIZE(DM_SIZE), .DM_WAYS(DM_WAYS), .VM_SIZE(VM_SIZE), .TM_SIZE(TM_SIZE),
              .MAX_DEPS(MAX_DEPS)) u_dct (
    .clk, .rst_n,
    .dep_valid, .dep_ready, .dep_addr, .dep_slot, .dep_idx,
    .rel_valid(drel_valid), .rel_ready(drel_ready),
    .rel_count(drel_data[RW-1 -: NW]), .rel_vm(drel_data[MAX_DEPS*VW-1:0]),
    .ntf_valid, .ntf_ready, .ntf_slot, .ntf_dep, .ntf_vm, .ntf_write_vm, .ntf_is_ready,
    .vm_free, .dm_free
  );

  picos_rtd #(.TM_SIZE(TM_SIZE)) u_rtd (
    .clk, .rst_n,
    .rdy_valid, .rdy_ready, .rdy_slot, .rdy_tid,
    .rej_valid, .rej_ready, .rej_slot, .rej_tid,
    .disp_valid, .disp_ready, .disp_slot, .disp_tid, .disp_info,
    .info_re, .info_raddr, .info_rdata
  );

  efpga_mem_2kx16 #(.DEPTH(TM_SIZE), .WIDTH(IW)) u_info_mem (
    .clk, .we(info_we), .waddr(info_waddr), .wdata(info_wdata),
    .re(info_re), .raddr(info_raddr), .rdata(info_rdata)
  );
endmodule
