// Multi-operand decimal adder.
//
// Adds ROWS packed-BCD operands of DIGITS digits each. The result is kept
// SUM_EXT_DIGITS (two) digits wider than the operands, so the carry out of
// the operand width (at most ROWS-1) is returned as a decimal value in the
// top digits rather than lost.
//
// Structure: a linear chain of ROWS-1 BCD carry-propagate adders; operand 0
// enters the first adder and every following operand is added to the
// running sum. The number of operands is the "depth" of the multi-operand
// adder (3, 7 and 15 for 16-digit operands split into 2, 4 and 8 parts).
// The chain of non-redundant BCD adders is this design's choice; a faster
// variant would accept redundant (carry-save) inputs.
//
// Interface: rows[ROWS] (each DIGITS BCD digits) -> sum (DIGITS+2 digits).
// Purely combinational.
module dec_multi_adder
  import pdm_pkg::*;
#(
  parameter int unsigned ROWS   = 3,
  parameter int unsigned DIGITS = 16
) (
  input  logic [ROWS-1:0][4*DIGITS-1:0]                 rows,
  output logic [4*(DIGITS+SUM_EXT_DIGITS)-1:0]          sum
);

  localparam int unsigned SW = 4 * (DIGITS + SUM_EXT_DIGITS);

  // partial[r] is the sum of rows 0..r
  logic [ROWS-1:0][SW-1:0] partial;

  assign partial[0] = {{(4*SUM_EXT_DIGITS){1'b0}}, rows[0]};

  for (genvar r = 1; r < ROWS; r++) begin : g_chain
    logic unused_cout;
    bcd_adder #(.DIGITS(DIGITS + SUM_EXT_DIGITS)) u_add (
      .a   (partial[r-1]),
      .b   ({{(4*SUM_EXT_DIGITS){1'b0}}, rows[r]}),
      .cin (1'b0),
      .sum (partial[r]),
      .cout(unused_cout)
    );
  end

  assign sum = partial[ROWS-1];

endmodule
