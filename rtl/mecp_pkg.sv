// mecp_pkg: types and constants shared by the mode-enabled multiplier
// coprocessor.
//
// The coprocessor multiplies IEEE-754 numbers in single (8-bit exponent,
// 23-bit fraction) or double (11-bit exponent, 52-bit fraction) precision
// and rounds the product in one of four selectable modes. The four modes and
// the two formats are the ones the published design is built around; the 2-bit
// encoding of the modes is this design's own choice and lists them in the
// order round-to-nearest-even, round-up, round-down, round-to-zero.
// "Round-up" and "round-down" are read as IEEE-754 roundTowardPositive and
// roundTowardNegative.
package mecp_pkg;

  // Rounding mode selected per operation.
  typedef enum logic [1:0] {
    RM_RNE = 2'd0,  // round to nearest, ties to even (the default mode)
    RM_RUP = 2'd1,  // round up, toward +infinity
    RM_RDN = 2'd2,  // round down, toward -infinity
    RM_RTZ = 2'd3   // round toward zero (truncate)
  } rmode_e;

  // Single precision format.
  localparam int unsigned SP_EW = 8;
  localparam int unsigned SP_MW = 23;
  // Double precision format.
  localparam int unsigned DP_EW = 11;
  localparam int unsigned DP_MW = 52;

  // Operand/result width of the coprocessor port (wide enough for double).
  localparam int unsigned XLEN = 64;

endpackage
