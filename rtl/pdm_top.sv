// Partitioned multiplier top level.
//
// The units stand side by side, each with its own ports; nothing is
// clocked.
//   * three symmetric DIGITS x DIGITS-digit BCD multipliers (dec_mult_sym)
//     with 8-, 4- and 2-digit cells: for 16-digit operands the
//     arrangements with four, sixteen and sixty-four cells (16-8, 16-4,
//     16-2);
//   * the asymmetric 16-8-4 arrangement of the same product
//     (dec_mult_asym);
//   * mu16, the 16 x 16-bit binary multiplier from four 8x8 multipliers and
//     three 16-bit ripple-carry adders;
//   * cai_adder, the 32-bit compute-add-increment adder.
// All four decimal multipliers take the same operand ports, so their
// products can be compared directly; each has its own product port.
//
// Interface:
//   dx, dy                         DIGITS-digit packed BCD operands
//   dp_16_8, dp_16_4, dp_16_2      products of the symmetric arrangements
//   dp_16_8_4                      product of the asymmetric arrangement
//   ba, bb -> bs                   16-bit binary operands, 32-bit product
//   ca, cb, ccin -> csum, ccout    32-bit CAI adder
// Which units exist follows the design; building them side by side, and
// sharing the decimal operand ports, is this implementation's choice.
module pdm_top
  import pdm_pkg::*;
#(
  parameter int unsigned DIGITS = OPERAND_DIGITS
) (
  input  logic [4*DIGITS-1:0] dx,
  input  logic [4*DIGITS-1:0] dy,
  output logic [8*DIGITS-1:0] dp_16_8,
  output logic [8*DIGITS-1:0] dp_16_4,
  output logic [8*DIGITS-1:0] dp_16_2,
  output logic [8*DIGITS-1:0] dp_16_8_4,

  input  logic [15:0]         ba,
  input  logic [15:0]         bb,
  output logic [31:0]         bs,

  input  logic [31:0]         ca,
  input  logic [31:0]         cb,
  input  logic                ccin,
  output logic [31:0]         csum,
  output logic                ccout
);

  dec_mult_sym #(.N(DIGITS), .C(DIGITS / 2)) u_dec_16_8 (
    .x(dx), .y(dy), .p(dp_16_8)
  );

  dec_mult_sym #(.N(DIGITS), .C(DIGITS / 4)) u_dec_16_4 (
    .x(dx), .y(dy), .p(dp_16_4)
  );

  dec_mult_sym #(.N(DIGITS), .C(DIGITS / 8)) u_dec_16_2 (
    .x(dx), .y(dy), .p(dp_16_2)
  );

  dec_mult_asym #(.N(DIGITS)) u_dec_16_8_4 (
    .x(dx), .y(dy), .p(dp_16_8_4)
  );

  mu16 u_mu16 (
    .a(ba), .b(bb), .s(bs)
  );

  cai_adder #(.W(32), .BLK(8)) u_cai (
    .a(ca), .b(cb), .cin(ccin), .sum(csum), .cout(ccout)
  );

endmodule
