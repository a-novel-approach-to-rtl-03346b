// 16x16-bit binary multiplier built from four 8x8 multipliers (mu16).
//
// The operands are split into bytes, A = A_H 2^8 + A_L and B likewise, and
// the four byte products come from four 8x8 multipliers. Three 16-bit
// ripple-carry adders combine them:
//   adder 1: A_H*B_L + A_L*B_H                      -> s1, carry c1
//   adder 2: s1 + {8'b0, (A_L*B_L)[15:8]}            -> s2, carry c2
//   adder 3: A_H*B_H + {7'b0, c1|c2, s2[15:8]}       -> S[31:16]
// with S[15:8] = s2[7:0] and S[7:0] = (A_L*B_L)[7:0] taken directly.
// c1 and c2 both weigh 2^24 and can never both be 1 (the middle terms sum
// to at most 2*255*255 + 255 < 2^17), so OR-ing them adds them exactly.
//
// Interface: a, b (16 bits) -> s (32 bits). Combinational. The split,
// the three adders and the OR of the two carries follow the design; the
// adders are ripple-carry adders, as in its schematic of this multiplier.
module mu16 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] s
);

  localparam int unsigned H = W / 2;

  logic [W-1:0] p_hh, p_hl, p_lh, p_ll;
  logic [W-1:0] s1, s2, s3;
  logic         c1, c2, c3_unused;

  m88 #(.W(H)) u_m_hh (.a(a[W-1:H]), .b(b[W-1:H]), .p(p_hh));
  m88 #(.W(H)) u_m_hl (.a(a[W-1:H]), .b(b[H-1:0]), .p(p_hl));
  m88 #(.W(H)) u_m_lh (.a(a[H-1:0]), .b(b[W-1:H]), .p(p_lh));
  m88 #(.W(H)) u_m_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(p_ll));

  rca #(.W(W)) u_add1 (
    .a(p_hl), .b(p_lh), .cin(1'b0), .sum(s1), .cout(c1)
  );

  rca #(.W(W)) u_add2 (
    .a(s1), .b({{H{1'b0}}, p_ll[W-1:H]}), .cin(1'b0), .sum(s2), .cout(c2)
  );

  rca #(.W(W)) u_add3 (
    .a(p_hh), .b({{(H-1){1'b0}}, c1 | c2, s2[W-1:H]}), .cin(1'b0),
    .sum(s3), .cout(c3_unused)
  );

  assign s = {s3, s2[H-1:0], p_ll[H-1:0]};

endmodule
