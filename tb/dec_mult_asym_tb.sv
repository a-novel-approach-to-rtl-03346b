// Self-checking testbench of the asymmetric mult16-8-4 decimal multiplier:
// random, sparse, half-populated and all-nines 16-digit operands against
// binary multiplication, with a count of non-zero carries into the top
// eight digits.
module dec_mult_asym_tb;
  timeunit 1ns; timeprecision 1ps;
  import bcd_ref_pkg::*;

  localparam int unsigned N = 16;

  logic [4*N-1:0] x, y;
  logic [8*N-1:0] p;
  int             checks = 0, failures = 0;
  int             carries = 0;

  dec_mult_asym #(.N(N)) dut (.x(x), .y(y), .p(p));

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
    if (dut.carry_val != '0) carries++;
    checks++;
    if (p != exp) begin
      failures++;
      $display("FAIL %h*%h: got %h exp %h", x, y, p, exp);
    end
  endtask

  initial begin
    check_one('0, '0);
    check_one(rand_bcd(N, 1), rand_bcd(N, 1));
    check_one(rand_bcd(N, 1), 128'h1);
    for (int n = 0; n < 3000; n++) begin
      check_one(rand_bcd(N, n % 4), rand_bcd(N, (n / 4) % 4));
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL the top-digit increment never saw a carry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
