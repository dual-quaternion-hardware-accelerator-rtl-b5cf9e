// quat_pre_left: left-operand pre-additions of the 8-multiplication quaternion
// product.
//
// For a left quaternion a = (a0, a1, a2, a3) = (w, x, y, z) it forms the eight
// sums and differences that are multiplied, element by element, with the
// outputs of quat_pre_right:
//   s0 = a0+a1   s1 = a3-a2   s2 = a0-a1   s3 = a2+a3
//   s4 = a1+a3   s5 = a1-a3   s6 = a0+a2   s7 = a0-a2
// Eight combinational fp32_add units; no clock. The factorisation itself is a
// design choice that realises the published quaternion product with 8 instead
// of 16 real multiplications.
module quat_pre_left
  import fp32_pkg::*;
(
  input  quat_t            a,
  output logic [7:0][31:0] s
);

  fp32_add u_s0 (.a(a[0]), .b(a[1]), .sub(1'b0), .y(s[0]));
  fp32_add u_s1 (.a(a[3]), .b(a[2]), .sub(1'b1), .y(s[1]));
  fp32_add u_s2 (.a(a[0]), .b(a[1]), .sub(1'b1), .y(s[2]));
  fp32_add u_s3 (.a(a[2]), .b(a[3]), .sub(1'b0), .y(s[3]));
  fp32_add u_s4 (.a(a[1]), .b(a[3]), .sub(1'b0), .y(s[4]));
  fp32_add u_s5 (.a(a[1]), .b(a[3]), .sub(1'b1), .y(s[5]));
  fp32_add u_s6 (.a(a[0]), .b(a[2]), .sub(1'b0), .y(s[6]));
  fp32_add u_s7 (.a(a[0]), .b(a[2]), .sub(1'b1), .y(s[7]));

endmodule
