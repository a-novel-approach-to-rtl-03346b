// Self-checking testbench of the BCD carry-propagate adder: random and
// corner-case 16-digit operands (all nines with carry-in, zeros), checked
// against binary addition of the converted operands.
module bcd_adder_tb;
  timeunit 1ns; timeprecision 1ps;
  import bcd_ref_pkg::*;

  localparam int unsigned D = 16;

  logic [4*D-1:0] a, b, sum;
  logic           cin, cout;
  int             checks = 0, failures = 0;

  bcd_adder #(.DIGITS(D)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(wide_t va, wide_t vb, logic c);
    wide_t exp_bin, got;
    a   = va[4*D-1:0];
    b   = vb[4*D-1:0];
    cin = c;
    #1;
    exp_bin = bcd_to_bin(va, D) + bcd_to_bin(vb, D) + wide_t'(c);
    got     = {63'd0, cout, sum};
    checks++;
    if (bcd_to_bin(got, D + 1) != exp_bin || !is_bcd(wide_t'(sum), D)) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %0d_%h", a, b, c, cout, sum);
    end
  endtask

  initial begin
    check_one('0, '0, 1'b0);
    check_one(rand_bcd(D, 1), '0, 1'b1);
    check_one(rand_bcd(D, 1), rand_bcd(D, 1), 1'b1);
    for (int n = 0; n < 2000; n++) begin
      check_one(rand_bcd(D, n % 4), rand_bcd(D, (n / 4) % 4), 1'($urandom_range(1, 0)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
