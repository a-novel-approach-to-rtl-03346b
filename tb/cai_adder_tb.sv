// Self-checking testbench of the 32-bit compute-add-increment adder:
// random operands plus cases that make a carry ripple through the
// increment circuits of every block, against a 33-bit sum. Counts how
// often a block's increment circuit overflowed (cy = 1) and how often a
// block's own adder produced the carry, and fails if either never happened.
module cai_adder_tb;
  timeunit 1ns; timeprecision 1ps;

  logic [31:0] a, b, sum;
  logic        cin, cout;
  int          checks = 0, failures = 0;
  int          inc_carries = 0, blk_carries = 0;

  cai_adder #(.W(32), .BLK(8)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

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
    if (dut.g_blk[1].hc[8] || dut.g_blk[2].hc[8] || dut.g_blk[3].hc[8]) inc_carries++;
    if (dut.g_blk[1].tcarry || dut.g_blk[2].tcarry || dut.g_blk[3].tcarry) blk_carries++;
    checks++;
    if ({cout, sum} != exp) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %0d_%h", va, vb, c, cout, sum);
    end
  endtask

  initial begin
    check_one('0, '0, 1'b0);
    check_one(32'hFFFF_FFFF, 32'h0, 1'b1);     // carry through all increments
    check_one(32'hFFFF_FF00, 32'h0000_0100, 1'b0);
    check_one(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    for (int n = 0; n < 5000; n++) begin
      check_one($urandom, $urandom, 1'($urandom_range(1, 0)));
    end
    checks++;
    if (inc_carries == 0 || blk_carries == 0) begin
      failures++;
      $display("FAIL increment overflow %0d, block carry %0d", inc_carries, blk_carries);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
