// Compute-add-increment (CAI) adder, W bits in blocks of BLK bits.
//
// The operands are cut into W/BLK blocks. Block 0 is an ordinary BLK-bit
// ripple-carry adder that takes the real carry-in and produces the low sum
// bits and carry c1. Every higher block adds its operand bits in its own
// ripple-carry adder with carry-in tied to 0, so all blocks compute a
// temporary sum (sum1) and temporary carry at the same time. An increment
// circuit, a chain of half adders, then adds the carry arriving from the
// block below to sum1, giving the final sum bits and a carry cy. The carry
// passed to the next block is cy OR the block's temporary carry (the two
// are never both 1: a temporary carry means sum1 <= 2^BLK - 2, which an
// increment cannot overflow). The carry leaving the last block is cout.
//
// Interface: a, b (W bits), cin -> sum (W bits), cout. Combinational.
// The 32-bit width, the four 8-bit blocks and the OR of the carries follow
// the design; W must be a multiple of BLK.
module cai_adder #(
  parameter int unsigned W   = 32,
  parameter int unsigned BLK = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NBLK = W / BLK;

  // carry into each block; carry[NBLK] is the adder's carry-out
  logic [NBLK:0] carry;

  rca #(.W(BLK)) u_rca0 (
    .a   (a[BLK-1:0]),
    .b   (b[BLK-1:0]),
    .cin (cin),
    .sum (sum[BLK-1:0]),
    .cout(carry[1])
  );

  assign carry[0] = cin;

  for (genvar k = 1; k < NBLK; k++) begin : g_blk
    logic [BLK-1:0] sum1;   // temporary sum, carry-in 0
    logic           tcarry; // temporary carry
    logic [BLK:0]   hc;     // half-adder carry chain of the increment circuit

    rca #(.W(BLK)) u_rca (
      .a   (a[k*BLK +: BLK]),
      .b   (b[k*BLK +: BLK]),
      .cin (1'b0),
      .sum (sum1),
      .cout(tcarry)
    );

    // increment circuit: half adders adding the incoming carry to sum1
    assign hc[0] = carry[k];
    for (genvar i = 0; i < BLK; i++) begin : g_ha
      assign sum[k*BLK + i] = sum1[i] ^ hc[i];
      assign hc[i+1]        = sum1[i] & hc[i];
    end

    assign carry[k+1] = hc[BLK] | tcarry;
  end

  assign cout = carry[NBLK];

endmodule
