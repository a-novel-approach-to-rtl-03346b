// Self-checking testbench of the 16x16-bit multiplier mu16: corner cases
// and random operands against the built-in product. Counts how often each
// of the two middle carries (c1 from the first adder, c2 from the second)
// was set, since they reach the last adder through an OR, and fails if
// either never happened.
module mu16_tb;
  timeunit 1ns; timeprecision 1ps;

  logic [15:0] a, b;
  logic [31:0] s;
  int          checks = 0, failures = 0;
  int          n_c1 = 0, n_c2 = 0;

  mu16 dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [15:0] va, logic [15:0] vb);
    a = va; b = vb;
    #1;
    if (dut.c1) n_c1++;
    if (dut.c2) n_c2++;
    checks++;
    if (s != 32'(va) * 32'(vb)) begin
      failures++;
      $display("FAIL %h*%h: got %h", va, vb, s);
    end
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, '1);
    check_one(16'hFFFF, 16'h0001);
    check_one(16'h00FF, 16'hFF00);
    for (int n = 0; n < 20000; n++) begin
      check_one(16'($urandom), 16'($urandom));
    end
    checks++;
    if (n_c1 == 0 || n_c2 == 0) begin
      failures++;
      $display("FAIL carry c1 seen %0d times, c2 %0d times", n_c1, n_c2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
