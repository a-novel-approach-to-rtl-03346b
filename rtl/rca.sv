// W-bit ripple-carry adder.
//
// A chain of W full-adder cells: cell i adds a[i], b[i] and the carry of
// cell i-1 (cell 0 takes cin), and the carry of the last cell is cout. The
// result is valid only once the carry has rippled through all cells, so the
// delay grows linearly with W. The 32-bit width is the one the adder is
// drawn at; the binary 16x16 multiplier uses 16-bit instances and the
// compute-add-increment adder 8-bit ones.
//
// Interface: a, b (W bits), cin -> sum (W bits), cout. Combinational.
module rca #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    fa u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
