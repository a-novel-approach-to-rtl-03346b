// Self-checking testbench of the vertical-and-crosswise multiplier, run
// at 8 bits so that its column carries span several bits: all 65,536 pairs
// against the built-in product, and its 4x4 default exhaustively.
module urdhva_mult_tb;
  timeunit 1ns; timeprecision 1ps;

  logic [7:0]  a, b;
  logic [15:0] p;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int          checks = 0, failures = 0;

  urdhva_mult #(.W(4)) dut4 (.a(a4), .b(b4), .p(p4));

  urdhva_mult #(.W(8)) dut (.a(a), .b(b), .p(p));

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
        checks++;
        if (p != 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (p4 != 8'(i * j)) begin
          failures++;
          $display("FAIL 4x4 %0d*%0d: got %0d", i, j, p4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
