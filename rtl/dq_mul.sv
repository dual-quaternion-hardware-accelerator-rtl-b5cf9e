// dq_mul: pipelined dual quaternion product T = P*Q, the datapath of the Dual
// Quaternion IP.
//
// A dual quaternion is eight fp32 words in the order (1, i, j, k, eps*i, eps*j,
// eps*k, eps), element 0 in the low bits. Its real part is Pr = (P0,P1,P2,P3),
// its dual part Pd = (P7,P4,P5,P6) written as (w,x,y,z). The product is
//   real part  Tr = Pr*Qr
//   dual part  Td = Pr*Qd + Pd*Qr          (eps*eps = 0)
// which are the published product formulas. Each quaternion product uses the
// 8-multiplication factorisation (see quat_pre_left, quat_post). The
// pre-additions of Pr and of Qr are formed once and shared by two products, and
// the products of Pr*Qd and Pd*Qr are summed before a single post-addition
// network. That makes 24 real multiplications and 64 real additions
// (32 pre-additions, 8 product sums, 2 x 12 post-additions), the counts the
// source publication gives for its optimised algorithm.
//
// Timing (a design choice): four register stages, after the pre-additions,
// after the 24 multipliers, after the 8 product sums and after the
// post-additions. out_valid follows in_valid by 4 cycles; a new product can
// start every cycle. Only the valid bits are reset.
module dq_mul
  import fp32_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  dquat_t p,
  input  dquat_t q,
  output logic   out_valid,
  output dquat_t t
);

  quat_t pr, pd, qr, qd;
  assign pr = {p[3], p[2], p[1], p[0]};
  assign pd = {p[6], p[5], p[4], p[7]};
  assign qr = {q[3], q[2], q[1], q[0]};
  assign qd = {q[6], q[5], q[4], q[7]};

  // stage 1: pre-additions (32 adders)
  logic [7:0][31:0] spr_d, spd_d, tqr_d, tqd_d;
  logic [7:0][31:0] spr_q, spd_q, tqr_q, tqd_q;
  quat_pre_left  u_plr (.a(pr), .s(spr_d));
  quat_pre_left  u_pld (.a(pd), .s(spd_d));
  quat_pre_right u_prr (.b(qr), .t(tqr_d));
  quat_pre_right u_prd (.b(qd), .t(tqd_d));

  // stage 2: 24 multipliers
  logic [7:0][31:0] mrr_d, mrd_d, mdr_d;
  logic [7:0][31:0] mrr_q, mrd_q, mdr_q;
  for (genvar k = 0; k < 8; k++) begin : g_mul
    fp32_mul u_rr (.a(spr_q[k]), .b(tqr_q[k]), .y(mrr_d[k]));   // Pr*Qr
    fp32_mul u_rd (.a(spr_q[k]), .b(tqd_q[k]), .y(mrd_d[k]));   // Pr*Qd
    fp32_mul u_dr (.a(spd_q[k]), .b(tqr_q[k]), .y(mdr_d[k]));   // Pd*Qr
  end

  // stage 3: sum of the two dual-part product vectors (8 adders)
  logic [7:0][31:0] mdu_d, mdu_q, mrr_q2;
  for (genvar k = 0; k < 8; k++) begin : g_sum
    fp32_add u_sum (.a(mrd_q[k]), .b(mdr_q[k]), .sub(1'b0), .y(mdu_d[k]));
  end

  // stage 4: post-additions (2 x 12 adders)
  quat_t tr_d, td_d;
  quat_post u_post_r (.m(mrr_q2), .c(tr_d));
  quat_post u_post_d (.m(mdu_q),  .c(td_d));

  logic v1, v2, v3;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
      out_valid <= v3;
    end
  end

  always_ff @(posedge clk) begin
    spr_q  <= spr_d;
    spd_q  <= spd_d;
    tqr_q  <= tqr_d;
    tqd_q  <= tqd_d;
    mrr_q  <= mrr_d;
    mrd_q  <= mrd_d;
    mdr_q  <= mdr_d;
    mdu_q  <= mdu_d;
    mrr_q2 <= mrr_q;
    t      <= {td_d[0], td_d[3], td_d[2], td_d[1], tr_d[3], tr_d[2], tr_d[1], tr_d[0]};
  end

endmodule
