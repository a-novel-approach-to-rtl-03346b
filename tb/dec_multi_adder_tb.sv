// Self-checking testbench of the multi-operand decimal adder with 7 rows
// of 24 digits (the depth of the 16 x 16-digit multiplier from 4 x 4-digit
// cells): random and all-nines rows against a binary reference sum,
// including the carry digits on top.
module dec_multi_adder_tb;
  timeunit 1ns; timeprecision 1ps;
  import bcd_ref_pkg::*;

  localparam int unsigned ROWS = 7;
  localparam int unsigned D    = 24;

  logic [ROWS-1:0][4*D-1:0] rows;
  logic [4*(D+2)-1:0]       sum;
  int                       checks = 0, failures = 0;

  dec_multi_adder #(.ROWS(ROWS), .DIGITS(D)) dut (.rows(rows), .sum(sum));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t exp_bin;
    for (int n = 0; n < 1000; n++) begin
      exp_bin = '0;
      for (int r = 0; r < int'(ROWS); r++) begin
        wide_t v = (n == 0) ? rand_bcd(D, 1) : rand_bcd(D, (n + r) % 4);
        rows[r] = v[4*D-1:0];
        exp_bin += bcd_to_bin(v, D);
      end
      #1;
      checks++;
      if (bcd_to_bin(wide_t'(sum), D + 2) != exp_bin || !is_bcd(wide_t'(sum), D + 2)) begin
        failures++;
        $display("FAIL case %0d: got %h", n, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
