// Self-checking testbench of the symmetric partitioned decimal multiplier:
// three 16 x 16-digit instances, with 8-, 4- and 2-digit cells (four,
// sixteen and sixty-four cells), are driven with the same operands and
// compared with binary multiplication. Also checks the multi-operand adder
// depth of each (3, 7 and 15 rows) and counts how often the incrementer of
// the top digits received a non-zero carry.
module dec_mult_sym_tb;
  timeunit 1ns; timeprecision 1ps;
  import bcd_ref_pkg::*;

  localparam int unsigned N = 16;

  logic [4*N-1:0] x, y;
  logic [8*N-1:0] p8, p4, p2;
  int             checks = 0, failures = 0;
  int             carries = 0;

  dec_mult_sym #(.N(N), .C(8)) dut8 (.x(x), .y(y), .p(p8));
  dec_mult_sym #(.N(N), .C(4)) dut4 (.x(x), .y(y), .p(p4));
  dec_mult_sym #(.N(N), .C(2)) dut2 (.x(x), .y(y), .p(p2));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(wide_t vx, wide_t vy);
    wide_t exp;
    x = vx[4*N-1:0];
    y = vy[4*N-1:0];
    #1;
    exp = bin_to_bcd(bcd_to_bin(vx, N) * bcd_to_bin(vy, N), 2 * N);
    if (dut8.carry_val != '0) carries++;
    checks += 3;
    if (p8 != exp) begin failures++; $display("FAIL C=8 %h*%h: got %h exp %h", x, y, p8, exp); end
    if (p4 != exp) begin failures++; $display("FAIL C=4 %h*%h: got %h exp %h", x, y, p4, exp); end
    if (p2 != exp) begin failures++; $display("FAIL C=2 %h*%h: got %h exp %h", x, y, p2, exp); end
  endtask

  initial begin
    checks += 3;
    if (dut8.ROWS != 3 || dut4.ROWS != 7 || dut2.ROWS != 15) begin
      failures++;
      $display("FAIL adder depths %0d %0d %0d", dut8.ROWS, dut4.ROWS, dut2.ROWS);
    end
    check_one('0, '0);
    check_one(rand_bcd(N, 1), rand_bcd(N, 1));
    check_one(rand_bcd(N, 1), 128'h1);
    check_one(128'h1, rand_bcd(N, 0));
    for (int n = 0; n < 3000; n++) begin
      check_one(rand_bcd(N, n % 4), rand_bcd(N, (n / 4) % 4));
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL the top-digit increment never saw a carry");
    end
    $display("increments with non-zero carry: %0d", carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
