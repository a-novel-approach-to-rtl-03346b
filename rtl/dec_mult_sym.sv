// Symmetric partitioned N x N-digit decimal multiplier.
//
// Both operands are cut into K = N/C equal parts of C digits,
//   X = sum_i X_i 10^(iC),  Y = sum_j Y_j 10^(jC),
// and every pair X_i * Y_j is formed by its own C x C-digit multiplier cell
// (K*K cells), the divide-and-conquer expansion of the product used in
// place of one large multiplier so that switching activity stays local to
// small cells. With N = 16 the choices C = 8, 4 and 2 give four, sixteen and
// sixty-four cells (the mult16-8, mult16-4 and mult16-2 arrangements).
//
// Alignment: cell product P_ij (2C digits) has weight 10^((i+j)C). The low
// C digits of the result come from P_00 alone and are passed through; the
// top C digits are covered only by P_(K-1)(K-1). Everything in between
// (digits C .. 2N-C-1) is summed by a multi-operand decimal adder whose
// 2K-1 operands ("rows") each hold cell products that do not overlap. Its
// carry (a small decimal value) is then added into the top C digits by a
// decimal incrementer. Row packing: products on diagonals s = i+j of the
// same parity never overlap, so product P_ij goes to row t (its index along
// the diagonal) in one of two groups of rows, chosen by the parity of s.
//
// Interface: x, y (N BCD digits) -> p (2N BCD digits). Purely
// combinational, no clock. The partitioning and alignment follow the
// design; the cell algorithm, the ripple BCD adders and the row packing are
// this implementation's choices. N must be a multiple of C, with N/C >= 2.
module dec_mult_sym
  import pdm_pkg::*;
#(
  parameter int unsigned N = OPERAND_DIGITS,
  parameter int unsigned C = 8
) (
  input  logic [4*N-1:0]   x,
  input  logic [4*N-1:0]   y,
  output logic [8*N-1:0]   p
);

  localparam int unsigned K    = N / C;          // parts per operand
  localparam int unsigned ROWS = 2 * K - 1;      // multi-operand adder depth
  localparam int unsigned MID  = 2 * N - 2 * C;  // digits summed by it

  // Row of cell product P_ij in the multi-operand adder.
  function automatic int unsigned row_of(int unsigned i, int unsigned j);
    int unsigned s, first;
    s     = i + j;
    first = (s >= K) ? s - K + 1 : 0;
    return ((s % 2) == ((K - 1) % 2)) ? (i - first) : (K + i - first);
  endfunction

  logic [K-1:0][K-1:0][8*C-1:0] prod;

  for (genvar i = 0; i < K; i++) begin : g_x
    for (genvar j = 0; j < K; j++) begin : g_y
      dec_mult_cell #(.NA(C), .NB(C)) u_cell (
        .x(x[4*C*i +: 4*C]),
        .y(y[4*C*j +: 4*C]),
        .p(prod[i][j])
      );
    end
  end

  logic [ROWS-1:0][4*MID-1:0]             rows;
  logic [8*N-1:0]                         placed;
  logic [4*(MID+SUM_EXT_DIGITS)-1:0]      mid_sum;
  logic [4*C-1:0]                         carry_val;
  logic                                   unused_top_cout;

  always_comb begin
    rows = '0;
    for (int unsigned i = 0; i < K; i++) begin
      for (int unsigned j = 0; j < K; j++) begin
        placed = (8*N)'(prod[i][j]) << (4 * C * (i + j));
        rows[row_of(i, j)] = rows[row_of(i, j)] | placed[4*C +: 4*MID];
      end
    end
  end

  dec_multi_adder #(.ROWS(ROWS), .DIGITS(MID)) u_mid (
    .rows(rows),
    .sum (mid_sum)
  );

  // Carry of the middle sum, as a C-digit BCD number for the incrementer.
  assign carry_val = (4*C)'(mid_sum[4*MID +: 4*SUM_EXT_DIGITS]);

  bcd_adder #(.DIGITS(C)) u_inc (
    .a   (prod[K-1][K-1][4*C +: 4*C]),
    .b   (carry_val),
    .cin (1'b0),
    .sum (p[8*N-4*C +: 4*C]),
    .cout(unused_top_cout)
  );

  assign p[4*C-1:0]       = prod[0][0][4*C-1:0];
  assign p[4*C +: 4*MID]  = mid_sum[4*MID-1:0];

endmodule
