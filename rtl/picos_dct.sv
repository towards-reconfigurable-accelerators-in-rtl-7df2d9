// picos_dct: Dependence Chain Tracker. Holds the Dependence Memory (DM) and the Version
// Memory (VM) and decides, for every dependence of every task, whether it is ready.
//
// DM: one entry per distinct address in flight, organised as DM_SIZE/DM_WAYS sets of
// DM_WAYS ways. An address is hashed (XOR fold) to a set; the ways of the set are compared
// in parallel. An entry stores the address and the tail of its version chain.
// VM: one entry per (task, dependence) pair. Entries of the same address form a chain in
// arrival order; each entry stores its task memory slot, its dependence index, the DM entry
// it belongs to and a link to the next version.
//
// New dependence (dep_*): on a DM miss a DM entry is taken and the dependence is ready at
// once; on a hit the new version is appended to the chain and waits. Every new dependence
// sends one notification to the TRS carrying the VM index it was stored at (write_vm) and
// whether it is already ready.
// Release (rel_*, a bundle of up to MAX_DEPS VM indices of a finished task, one handled per
// cycle): the finished version is the head of its chain; its successor, if any, becomes
// ready and the TRS is notified; otherwise the DM entry is freed.
// Releases have priority over new dependences. A new dependence whose DM set is full waits
// until a release frees a way. Each operation takes one cycle and needs the notification
// output to be free. vm_free/dm_free count free entries; the gateway admits a task only if
// both cover its dependence count.
//
// Following the document: the three memories, their sizes, and the use of DM for address
// matching and VM for ordering tasks on the same address. This design's own choices: every
// dependence is treated as read-write (strict order per address), the set-associative DM
// with XOR-fold hash, and the message formats.
module picos_dct #(
  parameter int unsigned DM_SIZE  = picos_pkg::DM_SIZE_DEF,
  parameter int unsigned DM_WAYS  = picos_pkg::DM_WAYS_DEF,
  parameter int unsigned VM_SIZE  = picos_pkg::VM_SIZE_DEF,
  parameter int unsigned TM_SIZE  = picos_pkg::TM_SIZE_DEF,
  parameter int unsigned MAX_DEPS = picos_pkg::MAX_DEPS_DEF,
  localparam int unsigned AW   = picos_pkg::ADDR_W,
  localparam int unsigned SW   = $clog2(TM_SIZE),
  localparam int unsigned DW   = $clog2(MAX_DEPS),
  localparam int unsigned VW   = $clog2(VM_SIZE),
  localparam int unsigned MW   = $clog2(DM_SIZE),
  localparam int unsigned SETS = DM_SIZE / DM_WAYS,
  localparam int unsigned SETW = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WW   = $clog2(DM_WAYS),
  localparam int unsigned NW   = $clog2(MAX_DEPS + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // new dependence from the gateway
  input  logic                   dep_valid,
  output logic                   dep_ready,
  input  logic [AW-1:0]          dep_addr,
  input  logic [SW-1:0]          dep_slot,
  input  logic [DW-1:0]          dep_idx,
  // release bundle from the TRS
  input  logic                   rel_valid,
  output logic                   rel_ready,
  input  logic [NW-1:0]          rel_count,
  input  logic [MAX_DEPS*VW-1:0] rel_vm,
  // notification to the TRS
  output logic                   ntf_valid,
  input  logic                   ntf_ready,
  output logic [SW-1:0]          ntf_slot,
  output logic [DW-1:0]          ntf_dep,
  output logic [VW-1:0]          ntf_vm,
  output logic                   ntf_write_vm,
  output logic                   ntf_is_ready,
  // free entries
  output logic [VW:0]            vm_free,
  output logic [MW:0]            dm_free
);
  // Dependence memory
  logic          dm_valid [DM_SIZE];
  logic [AW-1:0] dm_addr  [DM_SIZE];
  logic [VW-1:0] dm_tail  [DM_SIZE];
  // Version memory
  logic [SW-1:0] vm_slot  [VM_SIZE];
  logic [DW-1:0] vm_dep   [VM_SIZE];
  logic [VW-1:0] vm_next  [VM_SIZE];
  logic          vm_hasn  [VM_SIZE];
  logic [MW-1:0] vm_dm    [VM_SIZE];

  logic [NW-1:0] rel_k;     // position inside the current release bundle
  logic [MW:0]   dm_cnt;

  // ---------------- hash and set lookup ----------------
  function automatic logic [SETW-1:0] hash(input logic [AW-1:0] a);
    logic [SETW-1:0] h = '0;
    for (int i = 0; i < AW; i += SETW) h ^= SETW'(a >> i);
    return h;
  endfunction

  logic [SETW-1:0] set;
  logic            hit, has_free;
  logic [WW-1:0]   hit_way, free_way;
  logic [MW-1:0]   dm_idx;

  always_comb begin
    set      = (SETS > 1) ? hash(dep_addr) : '0;
    hit      = 1'b0;
    has_free = 1'b0;
    hit_way  = '0;
    free_way = '0;
    for (int w = DM_WAYS - 1; w >= 0; w--) begin
      if (dm_valid[MW'(set) * MW'(DM_WAYS) + MW'(w)] && dm_addr[MW'(set) * MW'(DM_WAYS) + MW'(w)] == dep_addr) begin
        hit = 1'b1; hit_way = WW'(w);
      end
      if (!dm_valid[MW'(set) * MW'(DM_WAYS) + MW'(w)]) begin
        has_free = 1'b1; free_way = WW'(w);
      end
    end
    dm_idx = MW'(set) * MW'(DM_WAYS) + MW'(hit ? hit_way : free_way);
  end

  // ---------------- version memory allocator ----------------
  logic          vm_av;
  logic [VW-1:0] vm_new;
  logic          vm_alloc, vm_rel_en;
  logic [VW-1:0] rel_v;

  picos_free_list #(.N(VM_SIZE)) u_vm_fl (
    .clk, .rst_n,
    .alloc_valid(vm_av), .alloc_idx(vm_new), .alloc(vm_alloc),
    .release_en(vm_rel_en), .release_idx(rel_v), .count(vm_free)
  );

  // ---------------- operation selection ----------------
  logic do_rel, do_dep;
  logic [VW-1:0] succ;
  logic          rel_has_next;

  assign rel_v        = rel_vm[VW*rel_k +: VW];
  assign rel_has_next = vm_hasn[rel_v];
  assign succ         = vm_next[rel_v];

  // a bundle with count 0 is consumed without work
  assign do_rel    = rel_valid && ((rel_count == '0) || !rel_has_next || ntf_ready);
  assign do_dep    = !rel_valid && dep_valid && vm_av && (hit || has_free) && ntf_ready;
  assign dep_ready = do_dep;
  assign rel_ready = rel_valid && do_rel && ((rel_count == '0) || (rel_k == rel_count - 1'b1));
  assign vm_alloc  = do_dep;
  assign vm_rel_en = do_rel && (rel_count != '0);
  assign dm_free   = dm_cnt;

  always_comb begin
    ntf_valid = 1'b0; ntf_slot = dep_slot; ntf_dep = dep_idx; ntf_vm = vm_new;
    ntf_write_vm = 1'b1; ntf_is_ready = !hit;
    if (rel_valid) begin
      ntf_valid    = (rel_count != '0) && rel_has_next;
      ntf_slot     = vm_slot[succ];
      ntf_dep      = vm_dep[succ];
      ntf_vm       = succ;
      ntf_write_vm = 1'b0;
      ntf_is_ready = 1'b1;
    end else begin
      ntf_valid = dep_valid && vm_av && (hit || has_free);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rel_k  <= '0;
      dm_cnt <= (MW+1)'(DM_SIZE);
      for (int i = 0; i < DM_SIZE; i++) dm_valid[i] <= 1'b0;
    end else begin
      if (do_rel && rel_count != '0) begin
        rel_k <= rel_ready ? '0 : rel_k + 1'b1;
        if (!rel_has_next) begin
          dm_valid[vm_dm[rel_v]] <= 1'b0;
        end
      end else if (rel_ready) begin
        rel_k <= '0;
      end
      if (do_dep && !hit) begin
        dm_valid[dm_idx] <= 1'b1;
        dm_addr[dm_idx]  <= dep_addr;
      end
      if (do_dep) dm_tail[dm_idx] <= vm_new;
      dm_cnt <= dm_cnt + (MW+1)'(do_rel && rel_count != '0 && !rel_has_next)
                       - (MW+1)'(do_dep && !hit);
    end
  end

  always_ff @(posedge clk) begin
    if (do_dep) begin
      vm_slot[vm_new] <= dep_slot;
      vm_dep[vm_new]  <= dep_idx;
      vm_hasn[vm_new] <= 1'b0;
      vm_dm[vm_new]   <= dm_idx;
      if (hit) begin
        vm_next[dm_tail[dm_idx]] <= vm_new;
        vm_hasn[dm_tail[dm_idx]] <= 1'b1;
      end
    end
  end

  // a released version must be the head of its chain: its DM entry must be live
  a_release_live: assert property (@(posedge clk) disable iff (!rst_n)
    (do_rel && rel_count != '0) |-> dm_valid[vm_dm[rel_v]]);
endmodule
