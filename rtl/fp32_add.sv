// fp32_add: combinational IEEE 754 single-precision adder/subtractor, the
// addition and subtraction part of the accelerators' own floating-point unit.
//
// y = a + b when sub = 0, y = a - b when sub = 1. The operand with the larger
// magnitude is put first, the other significand is shifted right into three
// extra bits (guard, round, sticky), the two are added or subtracted, the sum
// is normalised with a leading-zero count, and the result is rounded to nearest,
// ties to even.
//
// Design choices (the source publication only names the operation): subnormal inputs read
// as zero and subnormal results flush to signed zero; any NaN result is the
// quiet NaN 0x7fc00000; inf - inf gives NaN; an exact zero difference is +0.
// The unit has no clock; the cores that use it place the pipeline registers.
module fp32_add
  import fp32_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  logic        sa, sb, sx, sy;
  logic [7:0]  ea, eb, ex, ey;
  logic [22:0] fa, fb;
  logic [26:0] mx, my, my_sh;       // hidden bit, 23 fraction bits, G R S
  logic [7:0]  d;
  logic [4:0]  dsh;
  logic        sticky;
  logic [27:0] sum;
  logic [26:0] m;
  logic [4:0]  lz;
  logic signed [9:0] e;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic        round_up;
  logic [24:0] mr;                  // rounded significand with carry
  logic [22:0] mant;
  logic        eff_sub;
  logic [26:0] m_left;
  logic signed [9:0] er;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    fa = a[22:0];
    fb = b[22:0];
    a_nan  = (ea == 8'hff) && (fa != 0);
    b_nan  = (eb == 8'hff) && (fb != 0);
    a_inf  = (ea == 8'hff) && (fa == 0);
    b_inf  = (eb == 8'hff) && (fb == 0);
    a_zero = (ea == 8'h00);         // zero or subnormal: read as zero
    b_zero = (eb == 8'h00);

    // larger magnitude first
    if ({ea, fa} >= {eb, fb}) begin
      sx = sa; ex = ea; mx = {1'b1, fa, 3'b000};
      sy = sb; ey = eb; my = {1'b1, fb, 3'b000};
    end else begin
      sx = sb; ex = eb; mx = {1'b1, fb, 3'b000};
      sy = sa; ey = ea; my = {1'b1, fa, 3'b000};
    end

    // align the smaller operand, collecting the shifted-out bits as sticky;
    // a distance of 27 or more shifts everything out
    d   = ex - ey;
    dsh = (d > 8'd27) ? 5'd27 : d[4:0];
    my_sh  = my >> dsh;
    sticky = ((my_sh << dsh) != my);
    my_sh[0] = my_sh[0] | sticky;

    // add or subtract the significands: one adder, the subtrahend inverted
    eff_sub = sx ^ sy;
    sum = {1'b0, mx} + ({1'b0, my_sh} ^ {28{eff_sub}}) + 28'(eff_sub);

    // normalise: one position right on a carry out, else left by the
    // leading-zero count
    lz = 5'd0;
    for (int i = 0; i <= 26; i++)
      if (sum[i]) lz = 5'(26 - i);
    m_left = sum[26:0] << lz;
    m  = sum[27] ? {sum[27:2], sum[1] | sum[0]} : m_left;
    e  = $signed({2'b00, ex}) + (sum[27] ? 10'sd1 : -$signed({5'd0, lz}));

    // round to nearest, ties to even
    round_up = m[2] & (m[1] | m[0] | m[3]);
    mr = {1'b0, m[26:3]} + {24'd0, round_up};
    er = e + $signed({9'd0, mr[24]});
    mant = mr[24] ? mr[23:1] : mr[22:0];

    // result and special cases
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = FP32_QNAN;
    else if (a_inf)
      y = {sa, 8'hff, 23'd0};
    else if (b_inf)
      y = {sb, 8'hff, 23'd0};
    else if (a_zero && b_zero)
      y = {sa & sb, 31'd0};
    else if (b_zero)
      y = {sa, ea, fa};
    else if (a_zero)
      y = {sb, eb, fb};
    else if (sum == 28'd0)
      y = 32'd0;
    else if (er >= 10'sd255)
      y = {sx, 8'hff, 23'd0};
    else if (er <= 10'sd0)
      y = {sx, 31'd0};
    else
      y = {sx, er[7:0], mant};
  end

endmodule
