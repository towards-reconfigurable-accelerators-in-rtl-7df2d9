// cnn_pkg: sizes and types shared by the CNN accelerator. 8-bit activations and weights,
// 16-bit microkernel results, 16 microkernels of 3 MACs, a two-line buffer of 488 words
// (2 x 244 pixels) and DSP blocks with 16-bit inputs and 32-bit accumulators follow the
// tile configuration; the back-pressure buffer depth and the activation modes are this
// design's own choice.
package cnn_pkg;
  localparam int unsigned DATA_W      = 8;    // input feature and weight width
  localparam int unsigned ACC_W       = 16;   // microkernel result width
  localparam int unsigned KMAX        = 3;    // largest kernel edge (3x3)
  localparam int unsigned MACS_DEF    = 3;    // MACs (DSP blocks) per microkernel
  localparam int unsigned NUM_MK_DEF  = 16;   // microkernels
  localparam int unsigned LINE_W_DEF  = 244;  // longest image line
  localparam int unsigned BP_DEPTH_DEF = 16;  // back-pressure buffer entries
  localparam int unsigned DSP_IN_W    = 16;   // eFPGA DSP operand width
  localparam int unsigned DSP_ACC_W   = 32;   // eFPGA DSP accumulator width

  // activation applied to microkernel results
  typedef enum logic [0:0] {
    ACT_NONE = 1'b0,   // pass partial sums unchanged
    ACT_RELU = 1'b1    // clamp negative results to zero
  } act_e;

  // one KxK window of unsigned input features, [row][column], row 0 oldest
  typedef logic [KMAX-1:0][KMAX-1:0][DATA_W-1:0] window_t;
  // one KxK set of signed weights, [row][column]
  typedef logic [KMAX-1:0][KMAX-1:0][DATA_W-1:0] wset_t;
endpackage
