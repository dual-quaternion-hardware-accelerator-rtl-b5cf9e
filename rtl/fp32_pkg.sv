// fp32_pkg: types and helpers shared by the single-precision floating-point
// datapath of both accelerators.
//
// fp32_t is one IEEE 754 binary32 word. quat_t holds a quaternion as four
// words in the order (w, x, y, z) = (1, i, j, k); dquat_t holds a dual
// quaternion as eight words in the order (1, i, j, k, eps*i, eps*j, eps*k, eps),
// which is the column order of the dual quaternion multiplication table.
// Element 0 sits in the least significant 32 bits.
//
// fp32_half() halves a value by decrementing its exponent. It is used by the
// post-addition network of the 8-multiplication quaternion product, where the
// factor 1/2 needs no multiplier. Like the rest of the datapath it flushes a
// result that would be subnormal to a signed zero.
package fp32_pkg;

  typedef logic [31:0]       fp32_t;
  typedef logic [3:0][31:0]  quat_t;
  typedef logic [7:0][31:0]  dquat_t;

  localparam fp32_t FP32_QNAN = 32'h7fc0_0000;

  function automatic fp32_t fp32_half(input fp32_t a);
    logic [7:0] e;
    e = a[30:23];
    if (e == 8'hff)      return a;                  // inf and NaN unchanged
    else if (e <= 8'd1)  return {a[31], 31'd0};     // zero, or would be subnormal
    else                 return {a[31], e - 8'd1, a[22:0]};
  endfunction

endpackage
