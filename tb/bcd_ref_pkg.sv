// Reference arithmetic for the testbenches: conversions between packed BCD
// and binary (up to 32 digits, 128 bits) and random BCD operands. The
// multipliers under test are checked against plain binary multiplication
// of the converted operands.
package bcd_ref_pkg;

  typedef logic [127:0] wide_t;

  function automatic wide_t bcd_to_bin(wide_t v, int unsigned digits);
    wide_t r = '0;
    for (int i = int'(digits) - 1; i >= 0; i--) begin
      r = r * 128'd10 + wide_t'(v[4*i +: 4]);
    end
    return r;
  endfunction

  function automatic wide_t bin_to_bcd(wide_t v, int unsigned digits);
    wide_t r = '0;
    wide_t t = v;
    for (int unsigned i = 0; i < digits; i++) begin
      r[4*i +: 4] = 4'(t % 128'd10);
      t = t / 128'd10;
    end
    return r;
  endfunction

  // Random BCD number of the given length. mode 0: uniform digits,
  // 1: all nines, 2: sparse (most digits zero), 3: only the top or only the
  // bottom half of the digits set.
  function automatic wide_t rand_bcd(int unsigned digits, int unsigned mode);
    wide_t r = '0;
    int unsigned half = $urandom_range(1, 0);
    for (int unsigned i = 0; i < digits; i++) begin
      case (mode)
        1: r[4*i +: 4] = 4'd9;
        2: r[4*i +: 4] = ($urandom_range(3, 0) == 0) ? 4'($urandom_range(9, 0)) : 4'd0;
        3: r[4*i +: 4] = ((i >= digits / 2) == (half == 1)) ? 4'($urandom_range(9, 0)) : 4'd0;
        default: r[4*i +: 4] = 4'($urandom_range(9, 0));
      endcase
    end
    return r;
  endfunction

  function automatic bit is_bcd(wide_t v, int unsigned digits);
    for (int unsigned i = 0; i < digits; i++) begin
      if (v[4*i +: 4] > 4'd9) return 1'b0;
    end
    return 1'b1;
  endfunction

endpackage
