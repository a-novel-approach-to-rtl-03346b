// Shared types and constants of the partitioned decimal multiplier.
//
// Operands are packed binary-coded decimal (BCD): digit i of an N-digit
// number sits in bits [4*i+3 : 4*i], digit 0 being the least significant.
// The default operand length of 16 digits is the one the design is
// evaluated at; everything else in the design is sized from parameters.
package pdm_pkg;

  // Bits per BCD digit.
  localparam int unsigned BCD_W = 4;

  // Default operand length in decimal digits (16 x 16-digit multiplier).
  localparam int unsigned OPERAND_DIGITS = 16;

  // Extra digits kept on top of a multi-operand decimal sum so that the sum
  // of up to 99 operands never overflows.
  localparam int unsigned SUM_EXT_DIGITS = 2;

  typedef logic [BCD_W-1:0] bcd_digit_t;

endpackage
