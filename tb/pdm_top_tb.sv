// End-to-end testbench of the whole design at its default sizes
// (16-digit decimal operands; 8-, 4- and 2-digit cells and the 16-8-4
// arrangement; 16-bit binary multiplier; 32-bit CAI adder). Each case
// drives all units at once and checks:
//   * all four decimal products against a binary reference;
//   * the binary product and the CAI sum against built-in arithmetic.
// It also counts, and requires at least once each, the mechanisms the
// design relies on: a non-zero carry into the top-digit incrementer of
// every decimal multiplier, each of the two middle carries of mu16, and
// in the CAI adder both an increment-circuit overflow and a carry from a
// block's own ripple adder.
module pdm_top_tb;
  timeunit 1ns; timeprecision 1ps;
  import bcd_ref_pkg::*;

  localparam int unsigned N = 16;

  logic [4*N-1:0] dx, dy;
  logic [8*N-1:0] dp_16_8, dp_16_4, dp_16_2, dp_16_8_4;
  logic [15:0]    ba, bb;
  logic [31:0]    bs;
  logic [31:0]    ca, cb, csum;
  logic           ccin, ccout;

  int checks = 0, failures = 0;
  int n_inc_8 = 0, n_inc_4 = 0, n_inc_2 = 0, n_inc_asym = 0, n_c1 = 0, n_c2 = 0, n_cai_inc = 0, n_cai_blk = 0;

  pdm_top dut (
    .dx(dx), .dy(dy), .dp_16_8(dp_16_8), .dp_16_4(dp_16_4), .dp_16_2(dp_16_2),
    .dp_16_8_4(dp_16_8_4),
    .ba(ba), .bb(bb), .bs(bs),
    .ca(ca), .cb(cb), .ccin(ccin), .csum(csum), .ccout(ccout)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(wide_t vx, wide_t vy, logic [15:0] va, logic [15:0] vb,
                           logic [31:0] wa, logic [31:0] wb, logic wc);
    wide_t       exp;
    logic [32:0] exp_add;
    dx = vx[4*N-1:0]; dy = vy[4*N-1:0];
    ba = va; bb = vb;
    ca = wa; cb = wb; ccin = wc;
    #1;
    exp     = bin_to_bcd(bcd_to_bin(vx, N) * bcd_to_bin(vy, N), 2 * N);
    exp_add = {1'b0, wa} + {1'b0, wb} + 33'(wc);
    if (dut.u_dec_16_8.carry_val != '0)   n_inc_8++;
    if (dut.u_dec_16_4.carry_val != '0)   n_inc_4++;
    if (dut.u_dec_16_2.carry_val != '0)   n_inc_2++;
    if (dut.u_dec_16_8_4.carry_val != '0) n_inc_asym++;
    if (dut.u_mu16.c1) n_c1++;
    if (dut.u_mu16.c2) n_c2++;
    if (dut.u_cai.g_blk[1].hc[8] || dut.u_cai.g_blk[2].hc[8] || dut.u_cai.g_blk[3].hc[8])
      n_cai_inc++;
    if (dut.u_cai.g_blk[1].tcarry || dut.u_cai.g_blk[2].tcarry || dut.u_cai.g_blk[3].tcarry)
      n_cai_blk++;
    checks += 6;
    if (dp_16_8 != exp) begin
      failures++; $display("FAIL 16-8 %h*%h: got %h exp %h", dx, dy, dp_16_8, exp);
    end
    if (dp_16_4 != exp) begin
      failures++; $display("FAIL 16-4 %h*%h: got %h exp %h", dx, dy, dp_16_4, exp);
    end
    if (dp_16_2 != exp) begin
      failures++; $display("FAIL 16-2 %h*%h: got %h exp %h", dx, dy, dp_16_2, exp);
    end
    if (dp_16_8_4 != exp) begin
      failures++; $display("FAIL 16-8-4 %h*%h: got %h exp %h", dx, dy, dp_16_8_4, exp);
    end
    if (bs != 32'(va) * 32'(vb)) begin
      failures++; $display("FAIL mu16 %h*%h: got %h", va, vb, bs);
    end
    if ({ccout, csum} != exp_add) begin
      failures++; $display("FAIL cai %h+%h+%0d: got %0d_%h", wa, wb, wc, ccout, csum);
    end
  endtask

  task automatic count_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("%-40s %0d", what, n);
    end
  endtask

  initial begin
    check_one('0, '0, '0, '0, '0, '0, 1'b0);
    check_one(rand_bcd(N, 1), rand_bcd(N, 1), 16'hFFFF, 16'hFFFF, '1, '0, 1'b1);
    for (int n = 0; n < 2000; n++) begin
      check_one(rand_bcd(N, n % 4), rand_bcd(N, (n / 4) % 4),
                16'($urandom), 16'($urandom), $urandom, $urandom, 1'($urandom_range(1, 0)));
    end
    count_seen("16-8: carry into top digits", n_inc_8);
    count_seen("16-4: carry into top digits", n_inc_4);
    count_seen("16-2: carry into top digits", n_inc_2);
    count_seen("16-8-4: carry into top digits", n_inc_asym);
    count_seen("mu16: carry c1 of first adder", n_c1);
    count_seen("mu16: carry c2 of second adder", n_c2);
    count_seen("cai: increment circuit overflow", n_cai_inc);
    count_seen("cai: carry from a block's own adder", n_cai_blk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
