// Switching-activity testbench for the decimal multipliers at their default
// 16-digit size. The partitioned design is meant to reduce power by keeping
// switching local to the cells whose operand parts change. Two input
// patterns are applied to the full top level:
//   1. only the four least significant digits of each operand change (the
//      rest stay zero): every cell whose operand parts are constant must show
//      no toggles at its output, and the cells on the low digits must toggle;
//   2. uniformly random 16-digit operands, for comparison.
// For each arrangement (16-8, 16-4, 16-2, 16-8-4) it reports the number of
// cell-output bit toggles, a rough stand-in for dynamic power, and checks
// every product against a binary reference along the way.
module activity_tb;
  timeunit 1ns; timeprecision 1ps;
  import bcd_ref_pkg::*;

  localparam int unsigned N = 16;

  logic [4*N-1:0] dx, dy;
  logic [8*N-1:0] dp_16_8, dp_16_4, dp_16_2, dp_16_8_4;
  logic [15:0]    ba, bb;
  logic [31:0]    bs, ca, cb, csum;
  logic           ccin, ccout;

  int checks = 0, failures = 0;

  pdm_top dut (
    .dx(dx), .dy(dy), .dp_16_8(dp_16_8), .dp_16_4(dp_16_4), .dp_16_2(dp_16_2),
    .dp_16_8_4(dp_16_8_4),
    .ba(ba), .bb(bb), .bs(bs),
    .ca(ca), .cb(cb), .ccin(ccin), .csum(csum), .ccout(ccout)
  );

  // Per-cell toggle counters.
  int t8 [2][2];
  int t4 [4][4];
  int t2 [8][8];
  int ta [9];

  logic [1:0][1:0][63:0] prev8;
  logic [3:0][3:0][31:0] prev4;
  logic [7:0][7:0][15:0] prev2;
  logic [8:0][63:0]   preva;

  function automatic logic [8:0][63:0] asym_cells();
    logic [8:0][63:0] c;
    c[0] = 64'(dut.u_dec_16_8_4.p_h_h);
    c[1] = 64'(dut.u_dec_16_8_4.p_h_lh);
    c[2] = 64'(dut.u_dec_16_8_4.p_h_ll);
    c[3] = 64'(dut.u_dec_16_8_4.p_lh_h);
    c[4] = 64'(dut.u_dec_16_8_4.p_ll_h);
    c[5] = 64'(dut.u_dec_16_8_4.p_lh_lh);
    c[6] = 64'(dut.u_dec_16_8_4.p_lh_ll);
    c[7] = 64'(dut.u_dec_16_8_4.p_ll_lh);
    c[8] = 64'(dut.u_dec_16_8_4.p_ll_ll);
    return c;
  endfunction

  task automatic snapshot();
    prev8 = dut.u_dec_16_8.prod;
    prev4 = dut.u_dec_16_4.prod;
    prev2 = dut.u_dec_16_2.prod;
    preva = asym_cells();
  endtask

  task automatic clear_counts();
    foreach (t8[i, j]) t8[i][j] = 0;
    foreach (t4[i, j]) t4[i][j] = 0;
    foreach (t2[i, j]) t2[i][j] = 0;
    foreach (ta[i]) ta[i] = 0;
  endtask

  task automatic apply(wide_t vx, wide_t vy);
    logic [8:0][63:0] ca_now;
    wide_t            exp;
    dx = vx[4*N-1:0];
    dy = vy[4*N-1:0];
    #1;
    foreach (t8[i, j]) t8[i][j] += $countones(prev8[i][j] ^ dut.u_dec_16_8.prod[i][j]);
    foreach (t4[i, j]) t4[i][j] += $countones(prev4[i][j] ^ dut.u_dec_16_4.prod[i][j]);
    foreach (t2[i, j]) t2[i][j] += $countones(prev2[i][j] ^ dut.u_dec_16_2.prod[i][j]);
    ca_now = asym_cells();
    foreach (ta[i]) ta[i] += $countones(preva[i] ^ ca_now[i]);
    snapshot();
    exp = bin_to_bcd(bcd_to_bin(vx, N) * bcd_to_bin(vy, N), 2 * N);
    checks++;
    if (dp_16_8 != exp || dp_16_4 != exp || dp_16_2 != exp || dp_16_8_4 != exp) begin
      failures++;
      $display("FAIL product of %h and %h", dx, dy);
    end
  endtask

  function automatic int sum8();
    int s = 0;
    foreach (t8[i, j]) s += t8[i][j];
    return s;
  endfunction
  function automatic int sum4();
    int s = 0;
    foreach (t4[i, j]) s += t4[i][j];
    return s;
  endfunction
  function automatic int sum2();
    int s = 0;
    foreach (t2[i, j]) s += t2[i][j];
    return s;
  endfunction
  function automatic int suma();
    int s = 0;
    foreach (ta[i]) s += ta[i];
    return s;
  endfunction

  // expect zero toggles where quiet is set, some toggles otherwise
  task automatic expect_toggles(string name, int n, bit quiet);
    checks++;
    if (quiet && n != 0) begin
      failures++;
      $display("FAIL %s: %0d toggles on a cell with constant inputs", name, n);
    end
    if (!quiet && n == 0) begin
      failures++;
      $display("FAIL %s: no toggles on a cell with changing inputs", name);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ba = '0; bb = '0; ca = '0; cb = '0; ccin = 1'b0;
    dx = '0; dy = '0;
    #1;
    snapshot();

    // Pattern 1: only digits 0..3 active.
    clear_counts();
    for (int n = 0; n < 500; n++) begin
      apply(rand_bcd(4, 0), rand_bcd(4, 0));
    end
    foreach (t8[i, j]) expect_toggles($sformatf("16-8 cell %0d,%0d", i, j), t8[i][j], !(i == 0 && j == 0));
    foreach (t4[i, j]) expect_toggles($sformatf("16-4 cell %0d,%0d", i, j), t4[i][j], !(i == 0 && j == 0));
    foreach (t2[i, j]) expect_toggles($sformatf("16-2 cell %0d,%0d", i, j), t2[i][j], !(i < 2 && j < 2));
    foreach (ta[i])    expect_toggles($sformatf("16-8-4 cell %0d", i), ta[i], i != 8);
    $display("low-digit operands, cell-output toggles: 16-8 %0d  16-4 %0d  16-2 %0d  16-8-4 %0d",
             sum8(), sum4(), sum2(), suma());

    // Pattern 2: all digits active.
    clear_counts();
    for (int n = 0; n < 500; n++) begin
      apply(rand_bcd(N, 0), rand_bcd(N, 0));
    end
    $display("full-width operands, cell-output toggles: 16-8 %0d  16-4 %0d  16-2 %0d  16-8-4 %0d",
             sum8(), sum4(), sum2(), suma());
    checks++;
    if (sum8() == 0 || sum4() == 0 || sum2() == 0 || suma() == 0) begin
      failures++;
      $display("FAIL an arrangement showed no activity on full-width operands");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
