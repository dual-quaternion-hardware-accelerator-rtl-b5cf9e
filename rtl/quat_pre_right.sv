// quat_pre_right: right-operand pre-additions of the 8-multiplication
// quaternion product.
//
// For a right quaternion b = (b0, b1, b2, b3) = (w, x, y, z) it forms
//   t0 = b0+b1   t1 = b2-b3   t2 = b2+b3   t3 = b0-b1
//   t4 = b1+b2   t5 = b1-b2   t6 = b0-b3   t7 = b0+b3
// which quat_pre_left's outputs multiply element by element. Eight
// combinational fp32_add units; no clock.
module quat_pre_right
  import fp32_pkg::*;
(
  input  quat_t            b,
  output logic [7:0][31:0] t
);

  fp32_add u_t0 (.a(b[0]), .b(b[1]), .sub(1'b0), .y(t[0]));
  fp32_add u_t1 (.a(b[2]), .b(b[3]), .sub(1'b1), .y(t[1]));
  fp32_add u_t2 (.a(b[2]), .b(b[3]), .sub(1'b0), .y(t[2]));
  fp32_add u_t3 (.a(b[0]), .b(b[1]), .sub(1'b1), .y(t[3]));
  fp32_add u_t4 (.a(b[1]), .b(b[2]), .sub(1'b0), .y(t[4]));
  fp32_add u_t5 (.a(b[1]), .b(b[2]), .sub(1'b1), .y(t[5]));
  fp32_add u_t6 (.a(b[0]), .b(b[3]), .sub(1'b1), .y(t[6]));
  fp32_add u_t7 (.a(b[0]), .b(b[3]), .sub(1'b0), .y(t[7]));

endmodule
