// Self-checking testbench of the ripple-carry adder at its 32-bit default:
// carry through all bits, zero, and random operands against a 33-bit sum.
module rca_tb;
  timeunit 1ns; timeprecision 1ps;

  logic [31:0] a, b, sum;
  logic        cin, cout;
  int          checks = 0, failures = 0;

  rca #(.W(32)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [31:0] va, logic [31:0] vb, logic c);
    logic [32:0] exp;
    a = va; b = vb; cin = c;
    #1;
    exp = {1'b0, va} + {1'b0, vb} + 33'(c);
    checks++;
    if ({cout, sum} != exp) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %0d_%h", va, vb, c, cout, sum);
    end
  endtask

  initial begin
    check_one('0, '0, 1'b0);
    check_one('1, '0, 1'b1);
    check_one('1, '1, 1'b1);
    check_one(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int n = 0; n < 5000; n++) begin
      check_one($urandom, $urandom, 1'($urandom_range(1, 0)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
