// roba_pkg: constants shared by the rounding-based approximate (RoBA)
// multiplier and the FIR filter built on it.
//
// ROBA_N is the operand width of the multiplier (32-bit signed operands,
// 64-bit product, as on the multiplier and filter symbols). FIR_TAPS is the
// number of coefficients of the filter (h0..h3). Both numbers follow the
// published design; nothing here is timing-related.
package roba_pkg;
  parameter int unsigned ROBA_N   = 32;
  parameter int unsigned FIR_TAPS = 4;
endpackage
