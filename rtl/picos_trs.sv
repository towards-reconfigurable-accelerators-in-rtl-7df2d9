// picos_trs: Task Reservation Station. Owns the Task Memory (TM): for every in-flight task
// one slot holding its identifier, its number of dependences, how many of them are still
// pending, and the Version Memory index of each dependence (needed to release them).
//
// One operation per cycle, in this priority:
//  1. notification from the DCT: record the VM index of a dependence and/or count one
//     dependence as ready; when the pending count reaches zero the task goes to the RTD.
//  2. finish from the scheduler: send the task's VM indices to the DCT as one release
//     bundle and free the TM slot.
//  3. new task from the gateway: take a free slot (nt_slot, shown before the handshake),
//     store identifier and dependence count; a task without dependences is ready at once.
// An operation waits while its output (RTD queue, release queue) cannot accept. Because
// notifications never wait on the release queue and finishes never wait on the DCT, the
// loop TRS -> DCT -> TRS cannot lock up.
//
// Following the document: the TRS keeps the ready/not-ready state of each task in the TM,
// and the TM holds the identifier and the count of free dependences. The message formats
// and the priority order are this design's choice.
module picos_trs #(
  parameter int unsigned TM_SIZE  = picos_pkg::TM_SIZE_DEF,
  parameter int unsigned VM_SIZE  = picos_pkg::VM_SIZE_DEF,
  parameter int unsigned MAX_DEPS = picos_pkg::MAX_DEPS_DEF,
  localparam int unsigned TW = picos_pkg::TID_W,
  localparam int unsigned SW = $clog2(TM_SIZE),
  localparam int unsigned DW = $clog2(MAX_DEPS),
  localparam int unsigned VW = $clog2(VM_SIZE),
  localparam int unsigned NW = $clog2(MAX_DEPS + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // new task from the gateway
  input  logic                   nt_valid,
  output logic                   nt_ready,
  input  logic [TW-1:0]          nt_tid,
  input  logic [NW-1:0]          nt_ndeps,
  output logic [SW-1:0]          nt_slot,
  output logic [SW:0]            tm_free,
  // notification from the DCT
  input  logic                   ntf_valid,
  output logic                   ntf_ready,
  input  logic [SW-1:0]          ntf_slot,
  input  logic [DW-1:0]          ntf_dep,
  input  logic [VW-1:0]          ntf_vm,
  input  logic                   ntf_write_vm,
  input  logic                   ntf_is_ready,
  // finished task from the scheduler
  input  logic                   fin_valid,
  output logic                   fin_ready,
  input  logic [SW-1:0]          fin_slot,
  // release bundle to the DCT
  output logic                   rel_valid,
  input  logic                   rel_ready,
  output logic [NW-1:0]          rel_count,
  output logic [MAX_DEPS*VW-1:0] rel_vm,
  // ready task to the RTD
  output logic                   rdy_valid,
  input  logic                   rdy_ready,
  output logic [SW-1:0]          rdy_slot,
  output logic [TW-1:0]          rdy_tid
);
  // Task memory
  logic [TW-1:0]          tm_tid   [TM_SIZE];
  logic [NW-1:0]          tm_ndeps [TM_SIZE];
  logic [NW-1:0]          tm_pend  [TM_SIZE];
  logic [MAX_DEPS*VW-1:0] tm_vm    [TM_SIZE];

  logic          slot_av;
  logic          do_ntf, do_fin, do_new, ntf_last;

  picos_free_list #(.N(TM_SIZE)) u_tm_fl (
    .clk, .rst_n,
    .alloc_valid(slot_av), .alloc_idx(nt_slot), .alloc(do_new),
    .release_en(do_fin), .release_idx(fin_slot), .count(tm_free)
  );

  assign ntf_last  = ntf_is_ready && (tm_pend[ntf_slot] == NW'(1));
  assign do_ntf    = ntf_valid && (!ntf_last || rdy_ready);
  assign do_fin    = !ntf_valid && fin_valid && rel_ready;
  assign do_new    = !ntf_valid && !fin_valid && nt_valid && slot_av &&
                     ((nt_ndeps != '0) || rdy_ready);
  assign ntf_ready = !ntf_last || rdy_ready;
  assign fin_ready = do_fin;
  assign nt_ready  = do_new;

  assign rel_valid = !ntf_valid && fin_valid;
  assign rel_count = tm_ndeps[fin_slot];
  assign rel_vm    = tm_vm[fin_slot];

  always_comb begin
    rdy_valid = 1'b0;
    rdy_slot  = ntf_slot;
    rdy_tid   = tm_tid[ntf_slot];
    if (ntf_valid) begin
      rdy_valid = ntf_last;
    end else if (!fin_valid && nt_valid && slot_av && nt_ndeps == '0) begin
      rdy_valid = 1'b1;
      rdy_slot  = nt_slot;
      rdy_tid   = nt_tid;
    end
  end

  always_ff @(posedge clk) begin
    if (do_ntf) begin
      if (ntf_write_vm) tm_vm[ntf_slot][VW*ntf_dep +: VW] <= ntf_vm;
      if (ntf_is_ready) tm_pend[ntf_slot] <= tm_pend[ntf_slot] - 1'b1;
    end
    if (do_new) begin
      tm_tid[nt_slot]   <= nt_tid;
      tm_ndeps[nt_slot] <= nt_ndeps;
      tm_pend[nt_slot]  <= nt_ndeps;
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    (do_ntf && ntf_is_ready) |-> (tm_pend[ntf_slot] != '0));
endmodule
