// One-bit full adder: s = a ^ b ^ cin, cout = majority(a, b, cin).
// The cell the ripple-carry adder is chained from, as in the design's RCA;
// the gate equations are the standard ones, since no gates are given.
// Interface: a, b, cin -> s, cout. Combinational.
module fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (cin & (a ^ b));

endmodule
