// picos_gateway: entry point of new tasks into Picos. A task arrives with its identifier,
// an info word, a dependence count (0..MAX_DEPS) and its dependence addresses. The gateway
// accepts it only when the Task Memory has a free slot and the Version and Dependence
// Memories have at least as many free entries as the task has dependences; otherwise the
// producer sees in_ready low (Picos accepts no more tasks while any memory is full).
// On acceptance, in the same cycle, the identifier and dependence count go to the TRS,
// which returns the slot, and the info word is written to the task info memory at that
// slot. The dependences then go to the DCT one per cycle (slot, index, address). The next
// task is accepted once the last dependence has been handed over, so a task with n
// dependences occupies the gateway for 1 + n cycles when nothing stalls.
//
// Following the document: the gateway splits the task between TRS, DCT and task info
// memory and refuses tasks when a memory is full. The reservation rule (a DM entry is
// counted for every dependence, even one that may match an existing address) and the
// timing are this design's choice. Dependence addresses of one task must be distinct.
module picos_gateway #(
  parameter int unsigned TM_SIZE  = picos_pkg::TM_SIZE_DEF,
  parameter int unsigned DM_SIZE  = picos_pkg::DM_SIZE_DEF,
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
  // new task
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [TW-1:0]          in_tid,
  input  logic [IW-1:0]          in_info,
  input  logic [NW-1:0]          in_ndeps,
  input  logic [MAX_DEPS*AW-1:0] in_addr,
  // to the TRS
  output logic                   nt_valid,
  input  logic                   nt_ready,
  output logic [TW-1:0]          nt_tid,
  output logic [NW-1:0]          nt_ndeps,
  input  logic [SW-1:0]          nt_slot,
  // to the task info memory
  output logic                   info_we,
  output logic [SW-1:0]          info_waddr,
  output logic [IW-1:0]          info_wdata,
  // to the DCT
  output logic                   dep_valid,
  input  logic                   dep_ready,
  output logic [AW-1:0]          dep_addr,
  output logic [SW-1:0]          dep_slot,
  output logic [DW-1:0]          dep_idx,
  // free entries
  input  logic [VW:0]            vm_free,
  input  logic [MW:0]            dm_free
);
  typedef enum logic {S_IDLE, S_DEPS} state_e;
  state_e state;

  logic [MAX_DEPS*AW-1:0] addr_q;
  logic [NW-1:0]          n_q, k_q;
  logic [SW-1:0]          slot_q;
  logic                   room;

  assign room       = (vm_free >= (VW+1)'(in_ndeps)) && (dm_free >= (MW+1)'(in_ndeps));
  assign nt_valid   = (state == S_IDLE) && in_valid && room;
  assign nt_tid     = in_tid;
  assign nt_ndeps   = in_ndeps;
  assign in_ready   = nt_valid && nt_ready;
  assign info_we    = in_ready;
  assign info_waddr = nt_slot;
  assign info_wdata = in_info;

  assign dep_valid  = (state == S_DEPS);
  assign dep_addr   = addr_q[AW*k_q +: AW];
  assign dep_slot   = slot_q;
  assign dep_idx    = DW'(k_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      n_q    <= '0;
      k_q    <= '0;
      slot_q <= '0;
      addr_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_ready && in_ndeps != '0) begin
          state  <= S_DEPS;
          addr_q <= in_addr;
          n_q    <= in_ndeps;
          k_q    <= '0;
          slot_q <= nt_slot;
        end
        S_DEPS: if (dep_ready) begin
          k_q <= k_q + 1'b1;
          if (k_q == n_q - 1'b1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_ndeps_range: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (in_ndeps <= NW'(MAX_DEPS)));
endmodule
