// picos_pkg: types and default sizes shared by the Picos task dependence manager.
// The memory sizes (TM 512, DM 2048, VM 2048) and four dependences per task follow the
// tile configuration chosen for Picos; the address, identifier and info widths are this
// design's own choice.
package picos_pkg;
  localparam int unsigned TM_SIZE_DEF  = 512;   // task memory slots (in-flight tasks)
  localparam int unsigned DM_SIZE_DEF  = 2048;  // dependence memory entries (addresses)
  localparam int unsigned VM_SIZE_DEF  = 2048;  // version memory entries (task-dependence pairs)
  localparam int unsigned MAX_DEPS_DEF = 4;     // dependences per task
  localparam int unsigned DM_WAYS_DEF  = 8;     // associativity of the dependence memory
  localparam int unsigned ADDR_W       = 64;    // dependence address width
  localparam int unsigned TID_W        = 32;    // task identifier width
  localparam int unsigned INFO_W       = 16;    // task info word (one memory cell word)
endpackage
