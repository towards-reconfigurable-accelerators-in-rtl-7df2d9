// picos_free_list: slot allocator for the Picos memories. Hands out indices 0..N-1.
// Slots never used since reset come from a counter, so no initialisation pass over the
// list is needed; released slots are kept on a stack and handed out first. 'count'
// is the number of slots that can still be allocated. An allocation and a release may
// happen in the same cycle. Releasing a slot that is not allocated is a usage error.
module picos_free_list #(
  parameter int unsigned N = 512,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          alloc_valid,   // a slot is available
  output logic [AW-1:0] alloc_idx,     // the slot that 'alloc' takes
  input  logic          alloc,
  input  logic          release_en,
  input  logic [AW-1:0] release_idx,
  output logic [AW:0]   count
);
  logic [AW-1:0] stack [N];
  logic [AW:0]   sp;      // entries on the stack
  logic [AW:0]   fresh;   // next never-used slot

  assign alloc_valid = (sp != '0) || (fresh != (AW+1)'(N));
  assign alloc_idx   = (sp != '0) ? stack[AW'(sp - 1'b1)] : fresh[AW-1:0];
  assign count       = sp + ((AW+1)'(N) - fresh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp <= '0; fresh <= '0;
    end else begin
      unique case ({alloc && alloc_valid, release_en})
        2'b10: if (sp != '0) sp <= sp - 1'b1; else fresh <= fresh + 1'b1;
        2'b01: sp <= sp + 1'b1;
        2'b11: if (sp == '0) begin                      // fresh slot out, released one in
                 fresh <= fresh + 1'b1;
                 sp    <= sp + 1'b1;
               end                                      // else the stack top is replaced
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (release_en) begin
      if (alloc && alloc_valid && sp != '0) stack[AW'(sp - 1'b1)] <= release_idx;
      else                                 stack[AW'(sp)]        <= release_idx;
    end
  end
endmodule
