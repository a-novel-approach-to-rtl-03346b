// Asymmetric partitioned 16 x 16-digit decimal multiplier (mult16-8-4).
//
// Each operand is cut unevenly into a high half of N/2 digits and two low
// quarters of N/4 digits: X = X_H 10^(N/2) + X_LH 10^(N/4) + X_LL, and Y
// likewise. The nine partial products use cells of three shapes: one
// (N/2)x(N/2) cell (X_H*Y_H), two (N/2)x(N/4) cells (X_H*Y_LH, X_H*Y_LL),
// two (N/4)x(N/2) cells (X_LH*Y_H, X_LL*Y_H) and four (N/4)x(N/4) cells.
//
// Alignment, for N = 16 (digit positions of each cell product):
//   row 0: X_H*Y_LL (8..19)
//   row 1: X_H*Y_LH (12..23), X_LH*Y_LL (4..11)
//   row 2: X_H*Y_H (16..31), X_LH*Y_LH (8..15), X_LL*Y_LL (0..7)
//   row 3: X_LH*Y_H (12..23), X_LL*Y_LH (4..11)
//   row 4: X_LL*Y_H (8..19)
// Digits 0..N/4-1 come from X_LL*Y_LL alone and pass through; digits
// 3N/2..2N-1 come from X_H*Y_H alone and receive the carry of the five-row
// multi-operand decimal adder that sums the digits in between.
//
// Interface: x, y (N BCD digits) -> p (2N BCD digits). Purely
// combinational. The cell sizes and the row arrangement follow the design;
// the cell algorithm and adder structure are this implementation's choices,
// shared with the symmetric multiplier. N must be a multiple of 4.
module dec_mult_asym
  import pdm_pkg::*;
#(
  parameter int unsigned N = OPERAND_DIGITS
) (
  input  logic [4*N-1:0] x,
  input  logic [4*N-1:0] y,
  output logic [8*N-1:0] p
);

  localparam int unsigned H    = N / 2;        // high part length
  localparam int unsigned Q    = N / 4;        // each low part length
  localparam int unsigned ROWS = 5;
  localparam int unsigned LOW  = Q;            // digits passed through
  localparam int unsigned MID  = 3 * H - Q;    // digits summed: Q .. 3H-1
  localparam int unsigned TOP  = H;            // digits incremented

  logic [4*H-1:0] xh, yh;
  logic [4*Q-1:0] xlh, xll, ylh, yll;

  assign xh  = x[4*H +: 4*H];
  assign xlh = x[4*Q +: 4*Q];
  assign xll = x[0   +: 4*Q];
  assign yh  = y[4*H +: 4*H];
  assign ylh = y[4*Q +: 4*Q];
  assign yll = y[0   +: 4*Q];

  logic [8*H-1:0]     p_h_h;
  logic [4*(H+Q)-1:0] p_h_lh, p_h_ll, p_lh_h, p_ll_h;
  logic [8*Q-1:0]     p_lh_lh, p_lh_ll, p_ll_lh, p_ll_ll;

  dec_mult_cell #(.NA(H), .NB(H)) u_h_h   (.x(xh),  .y(yh),  .p(p_h_h));
  dec_mult_cell #(.NA(H), .NB(Q)) u_h_lh  (.x(xh),  .y(ylh), .p(p_h_lh));
  dec_mult_cell #(.NA(H), .NB(Q)) u_h_ll  (.x(xh),  .y(yll), .p(p_h_ll));
  dec_mult_cell #(.NA(Q), .NB(H)) u_lh_h  (.x(xlh), .y(yh),  .p(p_lh_h));
  dec_mult_cell #(.NA(Q), .NB(H)) u_ll_h  (.x(xll), .y(yh),  .p(p_ll_h));
  dec_mult_cell #(.NA(Q), .NB(Q)) u_lh_lh (.x(xlh), .y(ylh), .p(p_lh_lh));
  dec_mult_cell #(.NA(Q), .NB(Q)) u_lh_ll (.x(xlh), .y(yll), .p(p_lh_ll));
  dec_mult_cell #(.NA(Q), .NB(Q)) u_ll_lh (.x(xll), .y(ylh), .p(p_ll_lh));
  dec_mult_cell #(.NA(Q), .NB(Q)) u_ll_ll (.x(xll), .y(yll), .p(p_ll_ll));

  // Full-width (2N-digit) rows, each product shifted to its weight.
  logic [ROWS-1:0][8*N-1:0]            full;
  logic [ROWS-1:0][4*MID-1:0]          rows;
  logic [4*(MID+SUM_EXT_DIGITS)-1:0]   mid_sum;
  logic [4*TOP-1:0]                    carry_val;
  logic                                unused_top_cout;

  always_comb begin
    full[0] = (8*N)'(p_h_ll)  << (4*H);
    full[1] = ((8*N)'(p_h_lh) << (4*(H+Q))) | ((8*N)'(p_lh_ll) << (4*Q));
    // the top H digits of X_H*Y_H are handled by the incrementer
    full[2] = ((8*N)'(p_h_h[4*H-1:0]) << (4*N))
            | ((8*N)'(p_lh_lh)        << (4*H))
            | ((8*N)'(p_ll_ll[8*Q-1:4*Q]) << (4*Q));
    full[3] = ((8*N)'(p_lh_h) << (4*(H+Q))) | ((8*N)'(p_ll_lh) << (4*Q));
    full[4] = (8*N)'(p_ll_h)  << (4*H);
    for (int unsigned r = 0; r < ROWS; r++) begin
      rows[r] = full[r][4*LOW +: 4*MID];
    end
  end

  dec_multi_adder #(.ROWS(ROWS), .DIGITS(MID)) u_mid (
    .rows(rows),
    .sum (mid_sum)
  );

  assign carry_val = (4*TOP)'(mid_sum[4*MID +: 4*SUM_EXT_DIGITS]);

  bcd_adder #(.DIGITS(TOP)) u_inc (
    .a   (p_h_h[4*H +: 4*H]),
    .b   (carry_val),
    .cin (1'b0),
    .sum (p[4*(LOW+MID) +: 4*TOP]),
    .cout(unused_top_cout)
  );

  assign p[4*LOW-1:0]      = p_ll_ll[4*Q-1:0];
  assign p[4*LOW +: 4*MID] = mid_sum[4*MID-1:0];

endmodule
