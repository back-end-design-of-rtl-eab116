// formal_pkg: constants shared by the cells of the formal cell library.
//
// Every cell of the library works on unsigned words of DATA_W bits (the
// 8-bit data bus used for all cells and layouts) and the matrix multipliers
// work on MAT_N x MAT_N matrices (the 2x2 case of the worked example).
// Arithmetic is modulo 2**DATA_W, as in a fixed-width incrementer chain.
package formal_pkg;

  // Word width of all cells (8-bit data bus).
  localparam int unsigned DATA_W = 8;

  // Matrix order of the matrix-matrix multipliers (2x2 example).
  localparam int unsigned MAT_N = 2;

  // Phases of the serial matrix multipliers' sequencers.
  typedef enum logic [2:0] {
    SEQ_IDLE,   // waiting for control
    SEQ_CALC,   // cells computing one element
    SEQ_SUM,    // add unit summing partial products (multiplier 2 only)
    SEQ_EMIT,   // one element valid on the output
    SEQ_GAP,    // control of the cells held low for one cycle
    SEQ_DONE    // all elements produced, ready high
  } seq_state_t;

endpackage
