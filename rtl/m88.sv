// 8x8-bit binary multiplier from four 4x4 Vedic multipliers (m88).
//
// The same arrangement as the 16x16 multiplier one level down: the operands
// are split into nibbles, A = A_H 2^4 + A_L and B likewise, four 4x4
// vertical-and-crosswise multipliers form the nibble products, and three
// W-bit ripple-carry adders combine them:
//   adder 1: A_H*B_L + A_L*B_H                     -> s1, carry c1
//   adder 2: s1 + {0, (A_L*B_L)[W-1:H]}             -> s2, carry c2
//   adder 3: A_H*B_H + {0, c1|c2, s2[W-1:H]}        -> P[2W-1:W]
// with P[W-1:H] = s2[H-1:0] and P[H-1:0] = (A_L*B_L)[H-1:0]. c1 and c2 carry
// the same weight and are never both 1 (2*15*15 + 15 < 2^9), so the OR adds
// them exactly.
//
// Interface: a, b (W bits) -> p (2W bits). Combinational. Four 4x4 blocks
// and three adders with an OR of two carries follow the design's
// description of the 8x8 block; that description uses carry-select adders,
// and ripple-carry adders are used here as in the 16x16 multiplier built
// from these blocks.
module m88 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  localparam int unsigned H = W / 2;

  logic [W-1:0] p_hh, p_hl, p_lh, p_ll;
  logic [W-1:0] s1, s2, s3;
  logic         c1, c2, c3_unused;

  urdhva_mult #(.W(H)) u_v_hh (.a(a[W-1:H]), .b(b[W-1:H]), .p(p_hh));
  urdhva_mult #(.W(H)) u_v_hl (.a(a[W-1:H]), .b(b[H-1:0]), .p(p_hl));
  urdhva_mult #(.W(H)) u_v_lh (.a(a[H-1:0]), .b(b[W-1:H]), .p(p_lh));
  urdhva_mult #(.W(H)) u_v_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(p_ll));

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

  assign p = {s3, s2[H-1:0], p_ll[H-1:0]};

endmodule
