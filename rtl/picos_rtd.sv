// picos_rtd: Ready Task Dispatcher. Queues the tasks the TRS marks ready and hands them, in
// order, to the external scheduler together with the task's info word from the task info
// memory. A task the scheduler cannot run now is handed back on the reject interface and
// goes to the back of the queue, to be offered again later.
//
// The queue has TM_SIZE entries, so it can hold every in-flight task and never overflows.
// Dispatch timing: a task leaves the queue into the output register in one cycle and the
// info memory read is issued in the same cycle, so disp_valid rises one cycle after the
// task reached the head of an empty output register. The output register refills in the
// cycle it is taken, giving one dispatch per cycle. A reject has priority over a new ready
// task for the queue's single write port.
//
// Following the document: the RTD talks to an external scheduler and the reject interface
// lets a task be retried later. The queue order and the timing are this design's choice.
module picos_rtd #(
  parameter int unsigned TM_SIZE = picos_pkg::TM_SIZE_DEF,
  localparam int unsigned TW = picos_pkg::TID_W,
  localparam int unsigned IW = picos_pkg::INFO_W,
  localparam int unsigned SW = $clog2(TM_SIZE)
) (
  input  logic          clk,
  input  logic          rst_n,
  // ready task from the TRS
  input  logic          rdy_valid,
  output logic          rdy_ready,
  input  logic [SW-1:0] rdy_slot,
  input  logic [TW-1:0] rdy_tid,
  // rejected task from the scheduler
  input  logic          rej_valid,
  output logic          rej_ready,
  input  logic [SW-1:0] rej_slot,
  input  logic [TW-1:0] rej_tid,
  // dispatch to the scheduler
  output logic          disp_valid,
  input  logic          disp_ready,
  output logic [SW-1:0] disp_slot,
  output logic [TW-1:0] disp_tid,
  output logic [IW-1:0] disp_info,
  // task info memory read port
  output logic          info_re,
  output logic [SW-1:0] info_raddr,
  input  logic [IW-1:0] info_rdata
);
  typedef struct packed {
    logic [SW-1:0] slot;
    logic [TW-1:0] tid;
  } entry_t;

  entry_t q_in, q_out;
  logic   q_in_valid, q_in_ready, q_out_valid, q_pop;

  assign q_in_valid = rej_valid || rdy_valid;
  assign q_in       = rej_valid ? entry_t'{rej_slot, rej_tid} : entry_t'{rdy_slot, rdy_tid};
  assign rej_ready  = q_in_ready;
  assign rdy_ready  = q_in_ready && !rej_valid;

  picos_fifo #(.WIDTH($bits(entry_t)), .DEPTH(TM_SIZE)) u_queue (
    .clk, .rst_n,
    .in_valid(q_in_valid), .in_ready(q_in_ready), .in_data(q_in),
    .out_valid(q_out_valid), .out_ready(q_pop), .out_data(q_out), .free()
  );

  assign q_pop      = q_out_valid && (!disp_valid || disp_ready);
  assign info_re    = q_pop;
  assign info_raddr = q_out.slot;
  assign disp_info  = info_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      disp_valid <= 1'b0;
      disp_slot  <= '0;
      disp_tid   <= '0;
    end else if (!disp_valid || disp_ready) begin
      disp_valid <= q_out_valid;
      if (q_out_valid) begin
        disp_slot <= q_out.slot;
        disp_tid  <= q_out.tid;
      end
    end
  end

  a_disp_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (disp_valid && !disp_ready) |=> (disp_valid && $stable(disp_slot) && $stable(disp_tid)));
endmodule
