// fp32_mul: combinational IEEE 754 single-precision multiplier, the
// multiplication part of the accelerators' own floating-point unit.
//
// The two 24-bit significands (hidden bit included) are multiplied into a
// 48-bit product, which is normalised by at most one position, and rounded to
// nearest, ties to even, with a guard bit and a sticky bit. The exponent is the
// sum of the operand exponents less the bias.
//
// Design choices (the source publication only names the operation): subnormal inputs read
// as zero and subnormal results flush to signed zero; results beyond the
// largest finite value become infinity; 0 * inf and any NaN operand give the
// quiet NaN 0x7fc00000. The unit has no clock; the cores that use it place the
// pipeline registers.
module fp32_mul
  import fp32_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        s;
  logic [7:0]  ea, eb;
  logic [47:0] p;
  logic [23:0] m;
  logic        g, st, round_up;
  logic [24:0] mr;
  logic [22:0] mant;
  logic signed [10:0] e;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    a_nan  = (ea == 8'hff) && (a[22:0] != 0);
    b_nan  = (eb == 8'hff) && (b[22:0] != 0);
    a_inf  = (ea == 8'hff) && (a[22:0] == 0);
    b_inf  = (eb == 8'hff) && (b[22:0] == 0);
    a_zero = (ea == 8'h00);
    b_zero = (eb == 8'h00);

    p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    // normalise by one position when the product is 2 or more
    m  = p[47] ? p[47:24] : p[46:23];
    g  = p[47] ? p[23] : p[22];
    st = p[47] ? (|p[22:0]) : (|p[21:0]);
    round_up = g & (st | m[0]);
    mr = {1'b0, m} + {24'd0, round_up};
    e  = $signed({3'd0, ea}) + $signed({3'd0, eb}) - 11'sd127
       + $signed({10'd0, p[47]}) + $signed({10'd0, mr[24]});
    mant = mr[24] ? mr[23:1] : mr[22:0];

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = FP32_QNAN;
    else if (a_inf || b_inf)
      y = {s, 8'hff, 23'd0};
    else if (a_zero || b_zero)
      y = {s, 31'd0};
    else if (e >= 11'sd255)
      y = {s, 8'hff, 23'd0};
    else if (e <= 11'sd0)
      y = {s, 31'd0};
    else
      y = {s, e[7:0], mant};
  end

endmodule
