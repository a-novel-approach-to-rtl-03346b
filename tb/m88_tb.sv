// Self-checking testbench of the 8x8 multiplier built from four 4x4
// blocks: all 65,536 operand pairs against the built-in product. Counts how
// often each of the two middle carries (c1, c2) that reach the last adder
// through an OR was set, and fails if either never happened.
module m88_tb;
  timeunit 1ns; timeprecision 1ps;

  logic [7:0]  a, b;
  logic [15:0] p;
  int          checks = 0, failures = 0;
  int          n_c1 = 0, n_c2 = 0;

  m88 #(.W(8)) dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        if (dut.c1) n_c1++;
        if (dut.c2) n_c2++;
        checks++;
        if (p != 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    checks++;
    if (n_c1 == 0 || n_c2 == 0) begin
      failures++;
      $display("FAIL carry c1 seen %0d times, c2 %0d times", n_c1, n_c2);
    end
    $display("c1 set %0d times, c2 set %0d times", n_c1, n_c2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
