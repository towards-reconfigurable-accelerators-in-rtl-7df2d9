// efpga_tile: the two accelerators the eFPGA tile is dimensioned for, side by side, each
// with its own ports: the Picos task dependence manager (control-flow workload) and the CNN
// accelerator (data-flow workload). On the silicon they are alternative configurations of
// the same reconfigurable fabric and never run together; here both are instantiated so
// either can be simulated from one top. The fabric itself (LUT6s, flip-flops, routing,
// I/O and configuration) is vendor IP and is not modelled; its DSP blocks (16-bit inputs,
// 32-bit accumulators) and memory cells (2048 x 16) appear as the models efpga_dsp and
// efpga_mem_2kx16 inside the two accelerators.
// Default sizes: Picos TM 512 / DM 2048 / VM 2048 / 4 dependences per task; CNN 16
// microkernels x 3 MACs (48 of the 52 DSPs), 2 x 244-word line buffer.
module efpga_tile
  import cnn_pkg::*;
#(
  parameter int unsigned TM_SIZE  = picos_pkg::TM_SIZE_DEF,
  parameter int unsigned DM_SIZE  = picos_pkg::DM_SIZE_DEF,
  parameter int unsigned VM_SIZE  = picos_pkg::VM_SIZE_DEF,
  parameter int unsigned MAX_DEPS = picos_pkg::MAX_DEPS_DEF,
  parameter int unsigned NUM_MK   = NUM_MK_DEF,
  parameter int unsigned LINE_W   = LINE_W_DEF,
  localparam int unsigned AW  = picos_pkg::ADDR_W,
  localparam int unsigned TW  = picos_pkg::TID_W,
  localparam int unsigned IW  = picos_pkg::INFO_W,
  localparam int unsigned SW  = $clog2(TM_SIZE),
  localparam int unsigned VW  = $clog2(VM_SIZE),
  localparam int unsigned DMW = $clog2(DM_SIZE),
  localparam int unsigned NW  = $clog2(MAX_DEPS + 1),
  localparam int unsigned XW  = $clog2(LINE_W + 1),
  localparam int unsigned MW  = (NUM_MK > 1) ? $clog2(NUM_MK) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // ---------------- Picos ----------------
  input  logic                    sub_valid,
  output logic                    sub_ready,
  input  logic [TW-1:0]           sub_tid,
  input  logic [IW-1:0]           sub_info,
  input  logic [NW-1:0]           sub_ndeps,
  input  logic [MAX_DEPS*AW-1:0]  sub_addr,
  output logic                    disp_valid,
  input  logic                    disp_ready,
  output logic [SW-1:0]           disp_slot,
  output logic [TW-1:0]           disp_tid,
  output logic [IW-1:0]           disp_info,
  input  logic                    rej_valid,
  output logic                    rej_ready,
  input  logic [SW-1:0]           rej_slot,
  input  logic [TW-1:0]           rej_tid,
  input  logic                    fin_valid,
  output logic                    fin_ready,
  input  logic [SW-1:0]           fin_slot,
  output logic [SW:0]             tm_free,
  output logic [VW:0]             vm_free,
  output logic [DMW:0]            dm_free,
  // ---------------- CNN accelerator ----------------
  input  logic                    cnn_clear,
  input  logic [XW-1:0]           cnn_width,
  input  logic [1:0]              cnn_ksize,
  input  act_e                    cnn_act,
  input  logic [3:0]              cnn_shift,
  input  logic                    wl_valid,
  input  logic [MW-1:0]           wl_mk,
  input  logic [3:0]              wl_tap,
  input  logic [DATA_W-1:0]       wl_data,
  input  logic                    w_swap,
  output logic                    w_bank,
  input  logic                    pix_valid,
  output logic                    pix_ready,
  input  logic [DATA_W-1:0]       pix_data,
  output logic                    res_valid,
  input  logic                    res_ready,
  output logic [NUM_MK*ACC_W-1:0] res_data,
  output logic [31:0]             stat_windows,
  output logic [31:0]             stat_skipped
);
  picos #(.TM_SIZE(TM_SIZE), .DM_SIZE(DM_SIZE), .VM_SIZE(VM_SIZE), .MAX_DEPS(MAX_DEPS)) u_picos (
    .clk, .rst_n,
    .sub_valid, .sub_ready, .sub_tid, .sub_info, .sub_ndeps, .sub_addr,
    .disp_valid, .disp_ready, .disp_slot, .disp_tid, .disp_info,
    .rej_valid, .rej_ready, .rej_slot, .rej_tid,
    .fin_valid, .fin_ready, .fin_slot,
    .tm_free, .vm_free, .dm_free
  );

  cnn_accel #(.NUM_MK(NUM_MK), .LINE_W(LINE_W)) u_cnn (
    .clk, .rst_n,
    .clear(cnn_clear), .cfg_width(cnn_width), .cfg_ksize(cnn_ksize), .cfg_act(cnn_act),
    .cfg_shift(cnn_shift),
    .wl_valid, .wl_mk, .wl_tap, .wl_data, .w_swap, .w_bank,
    .pix_valid, .pix_ready, .pix_data,
    .res_valid, .res_ready, .res_data, .stat_windows, .stat_skipped
  );
endmodule
