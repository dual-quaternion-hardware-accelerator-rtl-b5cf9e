// quat_mul: pipelined quaternion product c = a*b, the datapath of the
// Quaternion IP.
//
// It computes the Hamilton product, as in the published product formulas, with
// 8 real multiplications instead of 16: quat_pre_left and quat_pre_right form
// eight sums/differences of each operand, eight fp32_mul units multiply them
// pairwise, and quat_post combines the eight products. Quaternions are
// (w, x, y, z) = (1, i, j, k), element 0 in the low bits.
//
// Timing (a design choice): three register stages, after the pre-additions,
// after the multipliers and after the post-additions. out_valid follows
// in_valid by 3 cycles; a new product can start every cycle. Only the valid
// bits are reset.
module quat_mul
  import fp32_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  quat_t a,
  input  quat_t b,
  output logic  out_valid,
  output quat_t c
);

  logic [7:0][31:0] s_d, t_d, m_d;
  logic [7:0][31:0] s_q, t_q, m_q;
  quat_t            c_d;
  logic             v1, v2;

  quat_pre_left  u_pl (.a(a), .s(s_d));
  quat_pre_right u_pr (.b(b), .t(t_d));

  for (genvar k = 0; k < 8; k++) begin : g_mul
    fp32_mul u_mul (.a(s_q[k]), .b(t_q[k]), .y(m_d[k]));
  end

  quat_post u_post (.m(m_q), .c(c_d));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      out_valid <= v2;
    end
  end

  always_ff @(posedge clk) begin
    s_q <= s_d;
    t_q <= t_d;
    m_q <= m_d;
    c   <= c_d;
  end

endmodule
