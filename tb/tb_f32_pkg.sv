// tb_f32_pkg: reference conversions between binary32 bit patterns and the
// simulator's double-precision real, for the testbenches' golden models.
// f32_to_real is exact. real_to_f32 rounds the 53-bit significand of a double
// to 24 bits, to nearest with ties to even, and flushes results below the
// normal range to zero (the same convention as the design). Because the
// product or sum of two binary32 values computed in double is exact (for
// sums: while exponents differ by less than 29), real_to_f32(x op y) is the
// correctly rounded binary32 result.
package tb_f32_pkg;

  function automatic real f32_to_real(input logic [31:0] x);
    logic [10:0] e;
    if (x[30:23] == 8'd0) return x[31] ? -0.0 : 0.0;
    e = 11'(x[30:23]) - 11'd127 + 11'd1023;
    return $bitstoreal({x[31], e, x[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] real_to_f32(input real r);
    logic [63:0] b;
    logic        s, rnd, st, inc;
    int          e;
    logic [52:0] mant;
    logic [24:0] m;
    b = $realtobits(r);
    s = b[63];
    if (b[62:52] == 11'd0) return {s, 31'd0};
    e    = int'(b[62:52]) - 1023 + 127;
    mant = {1'b1, b[51:0]};
    rnd  = mant[28];
    st   = |mant[27:0];
    inc  = rnd & (st | mant[29]);
    m    = {1'b0, mant[52:29]} + 25'(inc);
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] f32_mul(input logic [31:0] x, input logic [31:0] y);
    return real_to_f32(f32_to_real(x) * f32_to_real(y));
  endfunction

  function automatic logic [31:0] f32_add(input logic [31:0] x, input logic [31:0] y);
    real r;
    r = f32_to_real(x) + f32_to_real(y);
    if (r == 0.0) begin
      // exact zero: +0 unless both operands are -0
      if (x[31] && y[31] && x[30:0] == 0 && y[30:0] == 0) return 32'h8000_0000;
      if (x[30:23] == 0 && y[30:23] == 0) return {x[31] & y[31], 31'd0};
      return 32'h0000_0000;
    end
    return real_to_f32(r);
  endfunction

  // small random binary32 value with exponent in [emin, emax]
  function automatic logic [31:0] rand_f32(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(0, emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
