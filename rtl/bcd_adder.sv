// Multi-digit BCD carry-propagate adder.
//
// Adds two DIGITS-digit packed BCD numbers and a carry-in. Each digit is
// added in binary (a 5-bit sum of at most 9+9+1 = 19); a digit sum above 9 is
// corrected by adding 6 and produces a decimal carry into the next digit, so
// the carry ripples from digit 0 upward. The same block is used both for the
// wide additions that combine the multiplier cells and, with one operand
// holding only a small carry value, as the decimal increment of the most
// significant part of a product.
//
// Interface: a, b (DIGITS BCD digits), cin -> sum (DIGITS digits), cout.
// Purely combinational. Inputs must be valid BCD (each digit 0..9).
// The digit-serial ripple structure is this design's choice; the adders are
// only named, not detailed, where they are used.
module bcd_adder #(
  parameter int unsigned DIGITS = 16
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                cin,
  output logic [4*DIGITS-1:0] sum,
  output logic                cout
);

  logic       carry;
  logic [4:0] dsum;

  always_comb begin
    carry = cin;
    sum   = '0;
    for (int unsigned i = 0; i < DIGITS; i++) begin
      dsum = {1'b0, a[4*i +: 4]} + {1'b0, b[4*i +: 4]} + {4'd0, carry};
      if (dsum > 5'd9) begin
        dsum  = dsum + 5'd6;
        carry = 1'b1;
      end else begin
        carry = 1'b0;
      end
      sum[4*i +: 4] = dsum[3:0];
    end
    cout = carry;
  end

endmodule
