// Self-checking testbench of the decimal multiplier cell: the 2 x 2-digit
// cell exhaustively (all 10^4 operand pairs) and an 8 x 4-digit cell on
// random and all-nines operands, against binary multiplication.
module dec_mult_cell_tb;
  timeunit 1ns; timeprecision 1ps;
  import bcd_ref_pkg::*;

  logic [7:0]  x2, y2;
  logic [15:0] p2;
  logic [31:0] x8;
  logic [15:0] y4;
  logic [47:0] p84;
  int          checks = 0, failures = 0;

  dec_mult_cell #(.NA(2), .NB(2)) dut2  (.x(x2), .y(y2), .p(p2));
  dec_mult_cell #(.NA(8), .NB(4)) dut84 (.x(x8), .y(y4), .p(p84));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t vx, vy;
    for (int i = 0; i < 100; i++) begin
      for (int j = 0; j < 100; j++) begin
        x2 = 8'(bin_to_bcd(wide_t'(i), 2));
        y2 = 8'(bin_to_bcd(wide_t'(j), 2));
        #1;
        checks++;
        if (wide_t'(p2) != bin_to_bcd(wide_t'(i * j), 4)) begin
          failures++;
          $display("FAIL 2x2 %0d*%0d: got %h", i, j, p2);
        end
      end
    end
    for (int n = 0; n < 1000; n++) begin
      vx = (n == 0) ? rand_bcd(8, 1) : rand_bcd(8, n % 4);
      vy = (n == 0) ? rand_bcd(4, 1) : rand_bcd(4, (n / 4) % 4);
      x8 = vx[31:0];
      y4 = vy[15:0];
      #1;
      checks++;
      if (wide_t'(p84) != bin_to_bcd(bcd_to_bin(vx, 8) * bcd_to_bin(vy, 4), 12)) begin
        failures++;
        $display("FAIL 8x4 %h*%h: got %h", x8, y4, p84);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
