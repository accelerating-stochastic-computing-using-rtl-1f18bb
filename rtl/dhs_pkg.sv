// dhs_pkg: types and constants shared by the deterministic Halton sequence
// (DHS) stochastic computing blocks.
//
// The three ways of decorrelating two number sources (prime length, rotation,
// clock division) are named by approach_e. The 8-bit precision used throughout
// is the reference configuration; every block also takes it as a parameter.
package dhs_pkg;

  // Default precision of every stochastic number generator (bits).
  localparam int unsigned DHS_N = 8;

  // Deterministic approach used to pair Halton1 with Halton2.
  typedef enum logic [1:0] {
    APPROACH_PRIME    = 2'd0,  // counter2 period 2^N-1, relatively prime to 2^N
    APPROACH_ROTATION = 2'd1,  // counter2 held for one cycle per counter1 period
    APPROACH_CLKDIV   = 2'd2   // counter2 steps once per counter1 period
  } approach_e;

endpackage
