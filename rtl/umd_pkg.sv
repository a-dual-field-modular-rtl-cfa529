// umd_pkg: types and constants shared by the unified modular divider.
//
// field_e encodes the field select line FSEL of the dual-field adders:
// GF(2^n) turns every carry off (bitwise XOR addition), GF(p) enables them.
// state_e lists the states of the divider controller. The guard-bit count
// is this design's choice: the carry-save registers are N+GUARD bits wide so
// that the signed intermediate values of the algorithm (|U|,|W| < 4p) and
// the degree-N field polynomial fit with two spare sign bits.
package umd_pkg;

  typedef enum logic {
    FIELD_GF2N = 1'b0,   // binary extension field, carries forced to 0
    FIELD_GFP  = 1'b1    // prime field, ordinary integer addition
  } field_e;

  typedef enum logic [2:0] {
    ST_IDLE,     // waiting for start
    ST_LOAD,     // registers take X, Y, p, 0
    ST_PHI1,     // first half of an iteration: A1 = U + kW on CSUA1
    ST_PHI2,     // second half: A3 on CSUA1, A2 on CSUA2, registers load
    ST_RESULT,   // convert W to a reduced binary result
    ST_DONE      // one-cycle done pulse
  } state_e;

  // Default number of guard bits above the operand width.
  localparam int unsigned UMD_GUARD = 5;

endpackage
