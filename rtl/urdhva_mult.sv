// Small binary multiplier in the vertical-and-crosswise (Urdhva
// Tiryagbhyam) form; used as the 4x4 Vedic multiplier block.
//
// Output bit k is produced from column k: the "crosswise" sum of all bit
// products a[i] & b[k-i] plus the carry passed on from column k-1. The
// least significant bit of the column sum is product bit k and the rest is
// carried into column k+1. The last column's carry gives the top bit.
//
// Interface: a, b (W bits) -> p (2W bits). Combinational. The design
// names 4x4 Vedic multiplier blocks and says their partial products are
// the vertical and crosswise terms, but does not detail the block; the
// column-wise formulation here is this implementation's reading of the
// method.
module urdhva_mult #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  // A column sum never exceeds W + carry < 2W, so 2*clog2(W)+2 bits suffice.
  localparam int unsigned CW = 2 * $clog2(W) + 2;

  logic [CW-1:0] col;
  logic [CW-1:0] carry;

  always_comb begin
    carry = '0;
    p     = '0;
    for (int unsigned k = 0; k < 2*W - 1; k++) begin
      col = carry;
      for (int unsigned i = 0; i < W; i++) begin
        if (k >= i && k - i < W) begin
          col = col + CW'(a[i] & b[k-i]);
        end
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
    p[2*W-1] = carry[0];
  end

endmodule
