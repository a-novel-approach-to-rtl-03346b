// NA x NB-digit decimal multiplier cell.
//
// Multiplies an NA-digit BCD number x by an NB-digit BCD number y and
// returns the (NA+NB)-digit BCD product, in non-redundant BCD as the cells
// of the partitioned multiplier deliver it.
//
// How it works: every digit pair is multiplied in binary (x_i * y_j <= 81)
// and split into a tens digit and a units digit. For each multiplier digit
// y_j the units digits form one partial-product row at weight 10^(i+j) and
// the tens digits another at weight 10^(i+j+1); the 2*NB rows are summed by
// a multi-operand decimal adder. The design leaves the cell algorithm open,
// so this digit-by-digit scheme is a plain choice of this implementation,
// not the pre-computed-multiples scheme of faster decimal multipliers.
//
// Interface: x (NA digits), y (NB digits) -> p (NA+NB digits).
// Purely combinational.
module dec_mult_cell
  import pdm_pkg::*;
#(
  parameter int unsigned NA = 2,
  parameter int unsigned NB = 2
) (
  input  logic [4*NA-1:0]      x,
  input  logic [4*NB-1:0]      y,
  output logic [4*(NA+NB)-1:0] p
);

  localparam int unsigned ROWS = 2 * NB;
  localparam int unsigned PD   = NA + NB;

  logic [ROWS-1:0][4*PD-1:0]                 rows;
  logic [4*(PD+SUM_EXT_DIGITS)-1:0]          total;
  logic [6:0]                                dprod;

  always_comb begin
    rows = '0;
    for (int unsigned j = 0; j < NB; j++) begin
      for (int unsigned i = 0; i < NA; i++) begin
        dprod = 7'(x[4*i +: 4] * y[4*j +: 4]);
        rows[2*j][4*(i+j) +: 4]       = 4'(dprod % 7'd10);
        rows[2*j+1][4*(i+j+1) +: 4]   = 4'(dprod / 7'd10);
      end
    end
  end

  dec_multi_adder #(.ROWS(ROWS), .DIGITS(PD)) u_sum (
    .rows(rows),
    .sum (total)
  );

  // The product of an NA- and an NB-digit number always fits NA+NB digits.
  assign p = total[4*PD-1:0];

endmodule
