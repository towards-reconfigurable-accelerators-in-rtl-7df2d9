# A multipurpose eFPGA tile: Picos task manager and sparse CNN accelerator

This RTL models the two accelerators that an embedded-FPGA tile for an HPC system-on-chip is
sized for. The tile is one reconfigurable fabric. It has 52 DSP blocks and 80 memory cells of
2048 x 16 bits. It is loaded with one of two very different workloads:

* **Picos**, a hardware task dependence manager. This is a control-flow workload. Software
  submits tasks together with the memory addresses they touch. Picos works out the order those
  tasks must keep and hands each task to a scheduler as soon as everything it depends on has
  finished.
* **A CNN accelerator**. This is a data-flow workload. It streams 8-bit feature maps through 16
  convolution microkernels, each with three multiply-accumulate units, and skips windows that
  are all zero.

In silicon the fabric holds only one of the two at a time. The top `efpga_tile` instantiates
both side by side, each with its own ports, so that either one can be simulated and synthesized
from a single top.

The fabric itself is not modelled: LUTs, flip-flops, routing, I/O cells and the configuration
bitstream. Its two hard primitives do appear, as small models:

* `efpga_dsp`: a signed 16x16 multiply with a 32-bit accumulator.
* `efpga_mem_2kx16`: a 2048 x 16 memory with one write port and one synchronous read port.

```
efpga_tile
├── picos                         task dependence manager
│   ├── picos_gateway             admission of new tasks
│   ├── picos_trs                 Task Reservation Station + Task Memory
│   ├── picos_dct                 Dependence Chain Tracker: Dependence + Version Memory
│   ├── picos_fifo                release queue TRS -> DCT
│   ├── picos_rtd                 Ready Task Dispatcher (ready queue, rejects)
│   └── efpga_mem_2kx16           task info memory
└── cnn_accel                     convolution accelerator
    ├── cnn_line_buffer           2 x 244 features -> KxK windows
    ├── cnn_sparsity_detect       zero-window test
    ├── cnn_weight_buffer         double-banked weights, one set per microkernel
    ├── cnn_microkernel x16       3 x efpga_dsp each
    ├── cnn_activation            ReLU / pass, arithmetic shift
    └── cnn_bp_buffer             back-pressure FIFO of result vectors
```

Shared constants are defined in `picos_pkg` and `cnn_pkg`. `picos_free_list` is a small helper
that hands out free entries of a memory.

## Picos: tracking dependences by address

### The problem

Take a task-parallel program, such as OpenMP tasks with `depend` clauses. It creates tasks in
program order and names the addresses each task works on. Two tasks that touch the same address
must run in the order they were created. Tasks that share no address may run at the same time.
Done in a software runtime, this bookkeeping adds overhead to every task, and with short tasks that overhead dominates. Picos does it in hardware, with
three memories:

| memory | entries (default) | one entry per | holds |
|---|---|---|---|
| Task Memory (TM, in the TRS) | 512 | task in flight | identifier, number of dependences, number still pending, VM index of each dependence |
| Dependence Memory (DM, in the DCT) | 2048 | distinct address in flight | address, tail of its version chain |
| Version Memory (VM, in the DCT) | 2048 | (task, dependence) pair | TM slot, dependence index, DM entry, link to the next version |

The ratio of 4 VM entries per TM entry matches the limit of `MAX_DEPS = 4` dependences per task.

### Life of a task

1. **Submission** (`sub_*` into `picos_gateway`). A task carries:
   * an identifier;
   * a 16-bit info word, which Picos stores but does not interpret;
   * a dependence count from 0 to 4;
   * the dependence addresses, 64 bits each.

   The gateway accepts the task only if three things hold:
   * the TM has a free slot;
   * the VM has at least as many free entries as the task has dependences;
   * the DM has at least as many free entries as the task has dependences.

   Otherwise `sub_ready` stays low: Picos takes no new tasks while a memory is full.

   The DM check is conservative. It reserves one DM entry per dependence, even though a
   dependence on an address that is already known uses no new DM entry.

   When a task is accepted:
   * the TRS stores it and returns its TM slot;
   * the info word is written to the task info memory at that slot;
   * the dependences go to the DCT, one per cycle.

   In total the task takes the gateway for 1 + n cycles.

2. **Dependence lookup** (`picos_dct`). The DM is split into 256 sets of 8 ways. An address
   picks its set through an XOR fold of its bits, and the 8 ways of that set are compared at
   once.
   * **Miss:** the address gets a new DM entry, and the dependence is *ready* immediately.
   * **Hit:** the new VM entry is linked behind the current tail of that address's chain, and
     the dependence *waits*.

   Either way the DCT sends one notification to the TRS. It carries the VM index, which the
   TRS stores for the later release, and whether the dependence is already ready.

   If every way of the set is taken, the dependence waits until a release frees one.

3. **Readiness** (`picos_trs`). Each notification that says "ready" lowers the task's pending
   count. When the count reaches zero, the task moves to the RTD. A task with no dependences is
   ready as soon as it is stored.

4. **Dispatch** (`picos_rtd`). Ready tasks queue in arrival order. The task at the head is
   offered on `disp_*`, together with its info word read from the task info memory, and one
   task can leave per cycle.

   The scheduler returns one of two things, each naming the task by its TM slot:
   * a *reject*: the task could not run now, and goes to the back of the queue;
   * a *finish*: the task has completed.

5. **Release**. On a finish, the TRS does three things:
   * collects the task's VM indices into one *release bundle*;
   * queues that bundle to the DCT through a 4-entry FIFO;
   * frees the TM slot.

   The DCT handles one VM index of the bundle per cycle. The finished version is always the
   head of its chain, because it was ready. Then:
   * if a successor exists, the successor becomes the new head, and the TRS is told that this
     dependence is ready;
   * otherwise the address is no longer used, and its DM entry is freed.

   The VM entry is freed in both cases.

### Why it cannot lock up

The TRS and the DCT send messages to each other in both directions:
* notifications go from the DCT to the TRS;
* release bundles go from the TRS to the DCT.

Two rules keep this loop from stalling:
* The TRS never makes a notification wait on the release queue.
* The DCT gives releases priority over new dependences. A release is stopped only when its
  notification output is busy.

The TRS works in this priority order: notification, then finish, then new task.

A dependence can also wait for a full DM set. Even so, the oldest task in flight always has all
of its dependences at the head of their chains. It is therefore ready, and once it finishes its
release makes room.

### What a dependence means here

Every dependence is treated as read-write. Tasks on the same address run strictly one after
another, in submission order. The design has no separate "input" dependence that would let
several readers of one address run together.

### Timing

Each unit handles one operation per cycle. With no stalls:
* a task with n dependences enters in 1 + n cycles;
* each dependence costs the DCT one cycle, and so does each released version;
* the ready queue delivers one task per cycle.

The DCT and TRS memories are arrays that are read combinationally. They model behaviour at the
cycle level. They do not map one-to-one onto the synchronous 2048 x 16 memory cells of the
fabric. Only the task info memory uses the memory-cell model.

## CNN accelerator: windows, microkernels and skipping

### Dataflow

One feature map streams in row by row on `pix_*`, as unsigned 8-bit values.

* **Line buffer** (`cnn_line_buffer`). Holds the two previous lines of up to 244 features
  (488 words) plus a 3x3 window register. Every new feature completes the window whose
  bottom-right corner it is. A KxK window, with K from 1 to 3 set at run time, is emitted once
  the row and column are both at least K-1. There is no padding and the stride is 1.

* **Sparsity detection** (`cnn_sparsity_detect`). Adds up the active taps of the window. The
  features are unsigned, so a sum of zero means every tap is zero, and the window is *skipped*.

* **Microkernels** (`cnn_microkernel` x 16). Every microkernel receives the same window and
  applies its own 3x3 weight set, so 16 output channels are computed from one input.
  * Each microkernel has `MACS` `efpga_dsp`s, three by default. The K*K active taps are
    numbered row by row, and DSP j takes tap t*MACS + j in step t.
  * A KxK window therefore takes ceil(K*K/MACS) cycles. With three MACs that is one kernel row
    per cycle, so K cycles. A skipped window takes 1 cycle and gives 0.
  * The DSP sums are added and saturated to a 16-bit result.

* **Weight buffer** (`cnn_weight_buffer`). Two banks of 16 x 9 signed 8-bit weights. The
  microkernels read the active bank. Meanwhile the host loads the other bank one weight per
  cycle through `wl_*`, then exchanges the banks with a `w_swap` pulse between feature maps.
  Weights are loaded once and reused for every window of the map.

* **Activation** (`cnn_activation`). Either ReLU or pass-through, followed by an arithmetic
  right shift by 0 to 15 for requantisation. Pass-through keeps negative partial sums for when
  the host adds up channels.

* **Back-pressure buffer** (`cnn_bp_buffer`). A FIFO of 16 result vectors, each 16 x 16 bits,
  in front of `res_*`.

### Flow control

A window starts only when two things hold:
* all microkernels are idle;
* the back-pressure buffer has room for this window's result and for the one still in flight
  (`free > inflight`).

Until then the line buffer holds its window and stops accepting features. A slow consumer on
`res_*` therefore stalls the input stream, and no result is ever lost.

### Throughput

For 3x3 kernels the array does 48 MACs per cycle: 16 microkernels x 3. Skipped windows cost one
cycle instead of three.

Border features that complete no window are taken while the microkernels are still busy with
the last window of the previous row. A dense 56x56 3x3 layer therefore keeps the MACs busy
98.6% of the time. At 159 MHz, 962 million MACs (about the size of SqueezeNet) take about
127 ms at that rate.

A 1x1 kernel uses one of the three MACs of each microkernel: one window per cycle, 16 MACs per
cycle. Networks that do most of their work in 1x1 layers, such as SqueezeNet's squeeze and 1x1
expand layers, run up to three times slower than that figure. To use all three MACs, a 1x1
layer would have to bring in three input channels or three features per cycle. This design does
not do that. With one input byte per cycle, a 1x1 layer could not feed more than 16 MACs per
cycle in any case.

Each window produces one vector of 16 x 16-bit results, 32 bytes per window, against one input
byte per window. Output bandwidth is therefore far higher than input bandwidth.

### Left to the host

The host does the following:
* adds up the results over input channels;
* pooling;
* sets up the input and output streams;
* loads the weights;
* sets the run-time values `cnn_width`, `cnn_ksize`, `cnn_act` and `cnn_shift`.

The number of microkernels, the line length and the number formats are fixed at synthesis as
parameters.

## Ports of `efpga_tile`

All handshakes are valid/ready: a transfer happens on a rising clock edge where both are high.
`rst_n` is an asynchronous, active-low reset. It clears the control state and the valid bits of
the Dependence Memory. It does not clear the contents of the other memories.

| group | direction | signals | use |
|---|---|---|---|
| submit | in | `sub_valid/ready`, `sub_tid`, `sub_info`, `sub_ndeps`, `sub_addr` (4 x 64 bits packed, dependence i in bits `[64*i +: 64]`) | new task |
| dispatch | out | `disp_valid/ready`, `disp_slot`, `disp_tid`, `disp_info` | ready task to the scheduler; keep `disp_slot` |
| reject | in | `rej_valid/ready`, `rej_slot`, `rej_tid` | hand a dispatched task back |
| finish | in | `fin_valid/ready`, `fin_slot` | task done; releases its dependences |
| status | out | `tm_free`, `vm_free`, `dm_free` | free entries of the three memories |
| CNN setup | in | `cnn_clear` (pulse before each map), `cnn_width`, `cnn_ksize`, `cnn_act`, `cnn_shift` | change only between maps |
| weights | in/out | `wl_valid`, `wl_mk`, `wl_tap` (row*3+column), `wl_data`, `w_swap`, `w_bank` | load the shadow bank, then swap |
| features | in | `pix_valid/ready`, `pix_data` | input map, row-major |
| results | out | `res_valid/ready`, `res_data` (16 lanes x 16 bits, lane m in bits `[16*m +: 16]`) | one vector per window, in window order |
| counters | out | `stat_windows`, `stat_skipped` | windows processed and skipped since reset |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `TM_SIZE` | 512 | tasks in flight |
| `DM_SIZE` | 2048 | distinct addresses in flight |
| `VM_SIZE` | 2048 | dependences in flight |
| `MAX_DEPS` | 4 | dependences per task |
| `DM_WAYS` (`picos_dct`) | 8 | DM associativity |
| `ADDR_W`, `TID_W`, `INFO_W` (`picos_pkg`) | 64, 32, 16 | address, task id, info word widths |
| `NUM_MK` | 16 | microkernels |
| `MACS` (`cnn_accel`, `cnn_microkernel`) | 3 | DSPs per microkernel |
| `LINE_W` | 244 | longest input line |
| `BP_DEPTH` (`cnn_accel`) | 16 | back-pressure buffer depth |

## Where this RTL goes beyond the published description

The following are choices of this design, not of the published description:
* the message formats and handshakes, which are valid/ready throughout;
* the set-associative DM and its hash;
* the strict read-write order on every dependence;
* the 4-entry release queue;
* the TRS priority order;
* the way rejects are queued;
* the window anchoring and skip timing of the CNN;
* the ReLU/shift activation;
* the depth of the back-pressure buffer.

The description names an activation step but not its function, and ReLU was chosen.

The DSP model uses 16-bit inputs and a 32-bit accumulator. The microkernel result is 16 bits,
because 8-bit operands over nine taps stay within 16 bits.

The connection to the processor cluster, a network-on-chip port, is not modelled. Plain
valid/ready ports take its place.

## Limits to keep in mind

* Picos orders every pair of tasks that share an address. Tasks that only read the same data
  still run one after another.
* The TM, DM and VM of Picos are arrays that are read in the same cycle. On the fabric they
  would need memory cells with a registered read. That costs an extra cycle per operation,
  which this RTL does not model.
* The CNN accelerator supports kernels up to 3x3 with stride 1 and no padding. Larger kernels,
  strides and padding are left to the host, as is summing over input channels.
* 1x1 layers use one MAC in three (see Throughput).
* The design has been verified only in two-state, cycle-based simulation. It has not been
  placed and routed on the fabric, so the 159 MHz (CNN) and 100 MHz (Picos) clock rates that
  the fabric is dimensioned for are not confirmed for this RTL.

## Simulation

Every block has a self-checking testbench, `tb/tb_<module>.sv`. Each one:
* compares the block against a reference model written in the testbench;
* prints `TB_RESULT checks=<n> failures=<n>`;
* includes a watchdog.

The helpers `picos_fifo` and `picos_free_list` are covered by `tb_picos_fifo` and
`tb_picos_free_list`.

`tb_efpga_tile` runs the whole tile with every parameter at its default. It covers:
* 1200 Picos tasks with random dependences, including finishes, rejects and full-memory stalls;
* a 5 x 244 feature map with 3x3 kernels and a 3 x 244 map with 1x1 kernels;
* bank swaps, sparse windows and output stalls.

It counts every one of these events and fails if any of them never happened. It runs in a few
seconds.

Two further testbenches run workloads at the default sizes.

`tb_picos_benchmarks` feeds Picos the task graphs of three kernels:
* a tiled Cholesky factorisation;
* Gauss-Seidel heat sweeps;
* blocked N-body.

A scheduler model runs each graph on 8 and on 32 cores, with 40 cycles of overhead per task.
The testbench checks:
* the dependence order;
* that all memories are free again at the end;
* that each run ends within 1/0.75 of the bound set by the dependence graph.

| kernel | speedup, 8 cores | speedup, 32 cores |
|---|---|---|
| Cholesky | 6.6 | 9.9 |
| Heat | 7.2 | 13.9 |
| N-body | 7.0 | 9.0 |

Heat has more tasks than the task memory holds, so submission stalls until tasks finish.

`tb_cnn_squeezenet` runs:
* 56x56 feature maps with 3x3 and 1x1 kernels, with and without zero regions;
* four lines of a 224-wide input.

It checks every result and the cycle count of every pass.

To build and run a testbench with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/cnn_pkg.sv rtl/picos_pkg.sv tb/tb_efpga_tile.sv \
  --top-module tb_efpga_tile -Mdir obj_tile -o sim
./obj_tile/sim +verilator+rand+reset+2
```

To run another testbench, replace `tb_efpga_tile` with its name. The unit testbenches of the
Picos blocks override the memory sizes (for example 16 tasks and 32 dependences) so that the
memories fill up often.

The remaining lint warnings are expected:
* unconnected optional outputs, such as `free` and `sum`;
* `rst_n` being used both as an asynchronous reset and inside assertions;
* package constants that not every module uses.
