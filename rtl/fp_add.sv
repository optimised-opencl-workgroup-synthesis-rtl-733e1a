// fp_add: IEEE-754 binary32 adder, combinational.
//
// The accumulator of every processing element. The operand of larger
// magnitude is taken as the reference; the other significand is shifted
// right by the exponent difference into a 50-bit window, with every bit
// shifted out ORed into the lowest bit (sticky). The two are added or
// subtracted, the result is normalised with a leading-one search and
// rounded to nearest, ties to even.
//
// Special values (this design's own choices): subnormal inputs count as
// zero, results below the normal range flush to a signed zero, an exact
// zero from opposite signs is +0, overflow gives infinity, NaN operands and
// inf - inf give the quiet NaN 0x7FC00000.
//
// Interface: a, b in, y out, no clock; the result is valid in the same cycle.
module fp_add
  import ocl_pkg::*;
(
  input  f32_t a,
  input  f32_t b,
  output f32_t y
);

  logic        sa, sb, sl;
  logic [7:0]  ea, eb, el, es;
  logic [22:0] ma, mb, ml, ms;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [7:0]  d;
  logic [49:0] big, sml, sml_sh;
  logic        sticky_in;
  logic [50:0] sum;
  int          lead;
  logic [5:0]  lz;
  logic [50:0] norm;
  logic [23:0] frac;
  logic        rnd, sticky, inc;
  logic [24:0] frac_r;
  logic signed [10:0] e;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (ma == '0);
    b_inf  = (eb == 8'hFF) && (mb == '0);
    a_nan  = (ea == 8'hFF) && (ma != '0);
    b_nan  = (eb == 8'hFF) && (mb != '0);

    // larger magnitude first
    if ({ea, ma} >= {eb, mb}) begin
      sl = sa; el = ea; ml = ma; es = eb; ms = mb;
    end else begin
      sl = sb; el = eb; ml = mb; es = ea; ms = ma;
    end
    d     = el - es;
    big   = {1'b1, ml, 26'd0};
    sml = {1'b1, ms, 26'd0};
    if (d >= 8'd50) begin
      sml_sh  = '0;
      sticky_in = 1'b1;
    end else begin
      sml_sh  = sml >> d;
      sticky_in = |(sml & ((50'd1 << d) - 50'd1));
    end
    sml_sh[0] = sml_sh[0] | sticky_in;

    if (sa == sb) sum = {1'b0, big} + {1'b0, sml_sh};
    else          sum = {1'b0, big} - {1'b0, sml_sh};

    lead = 0;
    for (int i = 0; i <= 50; i++)
      if (sum[i]) lead = i;
    lz   = 6'(50 - lead);
    norm = sum << lz;
    frac   = norm[50:27];
    rnd    = norm[26];
    sticky = |norm[25:0];
    inc    = rnd & (sticky | frac[0]);
    frac_r = {1'b0, frac} + 25'(inc);
    e = 11'(signed'({3'b0, el})) + 11'sd1 - 11'(signed'({5'b0, lz}));
    if (frac_r[24]) begin
      frac_r = frac_r >> 1;
      e      = e + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = 32'h7FC0_0000;
    else if (a_inf)
      y = {sa, 8'hFF, 23'd0};
    else if (b_inf)
      y = {sb, 8'hFF, 23'd0};
    else if (a_zero && b_zero)
      y = {sa & sb, 31'd0};
    else if (a_zero)
      y = b;
    else if (b_zero)
      y = a;
    else if (sum == '0)
      y = 32'h0000_0000;
    else if (e >= 11'sd255)
      y = {sl, 8'hFF, 23'd0};
    else if (e <= 11'sd0)
      y = {sl, 31'd0};
    else
      y = {sl, e[7:0], frac_r[22:0]};
  end

endmodule
