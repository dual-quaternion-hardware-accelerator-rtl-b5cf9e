// quat_post: post-addition network of the 8-multiplication quaternion product.
//
// From the eight products m = (A, B, C, D, E, F, G, H), m[k] = s[k] * t[k] of
// quat_pre_left and quat_pre_right, it forms the quaternion
//   w = B + ((G+H) - (E+F))/2        x = A - ((E+F) + (G+H))/2
//   y = C + ((E-F) + (G-H))/2        z = D + ((E-F) - (G-H))/2
// which equals the Hamilton product a*b of the published product formulas.
// Twelve combinational fp32_add units in three levels; the halvings are
// exponent decrements (fp32_half). No clock.
//
// The network is linear in m, so the sum of two products Pr*Qd + Pd*Qr can be
// formed by adding their two m vectors first and passing the sum through one
// quat_post; the dual quaternion core relies on this.
module quat_post
  import fp32_pkg::*;
(
  input  logic [7:0][31:0] m,
  output quat_t            c
);

  fp32_t ef_p, gh_p, ef_m, gh_m;     // E+F, G+H, E-F, G-H
  fp32_t l2_w, l2_x, l2_y, l2_z;     // second level

  fp32_add u_efp (.a(m[4]), .b(m[5]), .sub(1'b0), .y(ef_p));
  fp32_add u_ghp (.a(m[6]), .b(m[7]), .sub(1'b0), .y(gh_p));
  fp32_add u_efm (.a(m[4]), .b(m[5]), .sub(1'b1), .y(ef_m));
  fp32_add u_ghm (.a(m[6]), .b(m[7]), .sub(1'b1), .y(gh_m));

  fp32_add u_l2w (.a(gh_p), .b(ef_p), .sub(1'b1), .y(l2_w));
  fp32_add u_l2x (.a(ef_p), .b(gh_p), .sub(1'b0), .y(l2_x));
  fp32_add u_l2y (.a(ef_m), .b(gh_m), .sub(1'b0), .y(l2_y));
  fp32_add u_l2z (.a(ef_m), .b(gh_m), .sub(1'b1), .y(l2_z));

  fp32_add u_w (.a(m[1]), .b(fp32_half(l2_w)), .sub(1'b0), .y(c[0]));
  fp32_add u_x (.a(m[0]), .b(fp32_half(l2_x)), .sub(1'b1), .y(c[1]));
  fp32_add u_y (.a(m[2]), .b(fp32_half(l2_y)), .sub(1'b0), .y(c[2]));
  fp32_add u_z (.a(m[3]), .b(fp32_half(l2_z)), .sub(1'b0), .y(c[3]));

endmodule
