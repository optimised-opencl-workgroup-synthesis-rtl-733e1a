// fp_mul: IEEE-754 binary32 multiplier, combinational.
//
// The convolution kernel multiplies a float mask coefficient by a float
// pixel in every step, and this block is that multiply. The two 24-bit
// significands (hidden one included) are multiplied to a 48-bit product. It
// is normalised by at most one place and rounded to nearest, ties to even,
// using a round bit and a sticky bit. The exponent is ea + eb - 127 plus
// the normalisation and rounding carries.
//
// Special values (this design's own choices, as on common FPGA float
// cores): subnormal inputs count as zero and results below the normal range
// flush to a signed zero; overflow gives a signed infinity; NaN operands and
// inf*0 give the quiet NaN 0x7FC00000.
//
// Interface: a, b in, y out, no clock; the result is valid in the same
// cycle. The enclosing processing element registers around it.
module fp_mul
  import ocl_pkg::*;
(
  input  f32_t a,
  input  f32_t b,
  output f32_t y
);

  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [22:0] ma, mb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] prod;
  logic [22:0] frac;
  logic        rnd, sticky, inc;
  logic [23:0] frac_r;
  logic signed [10:0] e;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sy     = sa ^ sb;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (ma == '0);
    b_inf  = (eb == 8'hFF) && (mb == '0);
    a_nan  = (ea == 8'hFF) && (ma != '0);
    b_nan  = (eb == 8'hFF) && (mb != '0);

    prod = {1'b1, ma} * {1'b1, mb};
    e    = 11'(signed'({3'b0, ea})) + 11'(signed'({3'b0, eb})) - 11'sd127;
    if (prod[47]) begin
      frac   = prod[46:24];
      rnd    = prod[23];
      sticky = |prod[22:0];
      e      = e + 11'sd1;
    end else begin
      frac   = prod[45:23];
      rnd    = prod[22];
      sticky = |prod[21:0];
    end
    inc    = rnd & (sticky | frac[0]);
    frac_r = {1'b0, frac} + 24'(inc);
    if (frac_r[23]) e = e + 11'sd1;   // significand rounded up to 2.0

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = 32'h7FC0_0000;
    else if (a_inf || b_inf)
      y = {sy, 8'hFF, 23'd0};
    else if (a_zero || b_zero)
      y = {sy, 31'd0};
    else if (e >= 11'sd255)
      y = {sy, 8'hFF, 23'd0};
    else if (e <= 11'sd0)
      y = {sy, 31'd0};
    else
      y = {sy, e[7:0], frac_r[22:0]};
  end

endmodule
