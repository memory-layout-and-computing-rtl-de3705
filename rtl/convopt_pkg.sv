// convopt_pkg: shared encodings of the ConvOpt convolution engine.
//
// Kernels of binary- and ternary-weight networks hold only -1, 0 and +1, so
// every "multiplication" is an addition, a subtraction or nothing. The same
// two-bit code is used for kernel elements in the weight buffer and for the
// sign of a term in the lookup table (a term may be subtracted when a kernel
// was extracted as the opposite of a common kernel).
package convopt_pkg;

  typedef enum logic [1:0] {
    T_ZERO = 2'b00,
    T_POS  = 2'b01,
    T_NEG  = 2'b11
  } tern_e;

  // Which internal buffer a load-port write goes to (subtask 1).
  typedef enum logic [1:0] {
    LD_IB = 2'd0,   // input buffer: one input window element
    LD_WB = 2'd1,   // weight buffer: one kernel
    LD_LT = 2'd2    // lookup table: one entry (list of signed terms)
  } ld_sel_e;

  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,
    ST_CONV = 3'd1,   // (2) convolution on every kernel in WB -> TB
    ST_CE   = 3'd2,   // (4) common expressions of convolutions -> TB
    ST_ACC  = 3'd3,   // (3) accumulation for the original kernels -> OB
    ST_DONE = 3'd4
  } cstate_e;

endpackage
