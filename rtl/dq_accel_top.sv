// dq_accel_top: the two dual quaternion accelerators side by side.
//
// The Dual Quaternion IP (dq_ip) multiplies two dual quaternions in one
// operation with 24 floating-point multipliers; it is the choice when speed
// matters. The Quaternion IP (quat_ip) multiplies two quaternions with 8
// multipliers; it needs three operations per dual quaternion product but uses
// about a third of the arithmetic. Each has its own AXI4 slave port (prefix
// dq_ and q_), to be mapped into the host processor's memory by the system
// interconnect; a system that needs only one of them leaves the other port
// unconnected and drops it in synthesis. Register map and timing are given in
// axi4_pkg, dq_ip and quat_ip.
module dq_accel_top
  import axi4_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // Dual Quaternion IP slave port
  input  logic    dq_aw_valid,
  output logic    dq_aw_ready,
  input  axi_ax_t dq_aw,
  input  logic    dq_w_valid,
  output logic    dq_w_ready,
  input  axi_w_t  dq_w,
  output logic    dq_b_valid,
  input  logic    dq_b_ready,
  output axi_b_t  dq_b,
  input  logic    dq_ar_valid,
  output logic    dq_ar_ready,
  input  axi_ax_t dq_ar,
  output logic    dq_r_valid,
  input  logic    dq_r_ready,
  output axi_r_t  dq_r,
  // Quaternion IP slave port
  input  logic    q_aw_valid,
  output logic    q_aw_ready,
  input  axi_ax_t q_aw,
  input  logic    q_w_valid,
  output logic    q_w_ready,
  input  axi_w_t  q_w,
  output logic    q_b_valid,
  input  logic    q_b_ready,
  output axi_b_t  q_b,
  input  logic    q_ar_valid,
  output logic    q_ar_ready,
  input  axi_ax_t q_ar,
  output logic    q_r_valid,
  input  logic    q_r_ready,
  output axi_r_t  q_r
);

  dq_ip u_dq_ip (
    .clk, .rst_n,
    .aw_valid(dq_aw_valid), .aw_ready(dq_aw_ready), .aw(dq_aw),
    .w_valid(dq_w_valid),   .w_ready(dq_w_ready),   .w(dq_w),
    .b_valid(dq_b_valid),   .b_ready(dq_b_ready),   .b(dq_b),
    .ar_valid(dq_ar_valid), .ar_ready(dq_ar_ready), .ar(dq_ar),
    .r_valid(dq_r_valid),   .r_ready(dq_r_ready),   .r(dq_r)
  );

  quat_ip u_quat_ip (
    .clk, .rst_n,
    .aw_valid(q_aw_valid), .aw_ready(q_aw_ready), .aw(q_aw),
    .w_valid(q_w_valid),   .w_ready(q_w_ready),   .w(q_w),
    .b_valid(q_b_valid),   .b_ready(q_b_ready),   .b(q_b),
    .ar_valid(q_ar_valid), .ar_ready(q_ar_ready), .ar(q_ar),
    .r_valid(q_r_valid),   .r_ready(q_r_ready),   .r(q_r)
  );

endmodule
