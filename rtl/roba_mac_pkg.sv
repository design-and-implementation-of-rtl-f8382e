// Shared types and constants of the rounding-based approximate MAC.
//
// roba_mode_e selects which of the four rounding-based product terms the
// modified RoBA multiplier delivers (Xr and Yr are X and Y rounded to the
// nearest power of two). The four terms are the ones the design offers as an
// accuracy/complexity trade-off; the 2-bit encoding is this design's choice.
package roba_mac_pkg;

  // Operand width of the MAC (a 64-bit multiplier-accumulator).
  parameter int unsigned DEFAULT_N = 64;

  typedef enum logic [1:0] {
    ROBA_XR_YR = 2'd0,  // X*Y ~ Xr*Yr
    ROBA_XR_Y  = 2'd1,  // X*Y ~ Xr*Y
    ROBA_AVG   = 2'd2,  // X*Y ~ (Xr*Y + X*Yr) / 2
    ROBA_FULL  = 2'd3   // X*Y ~ Xr*Y + X*Yr - Xr*Yr
  } roba_mode_e;

endpackage
