// dq_ip: the Dual Quaternion IP, an AXI4 slave that multiplies two dual
// quaternions in one operation.
//
// The host writes the eight fp32 elements of P to 0x40..0x5C and of Q to
// 0x80..0x9C (element order 1, i, j, k, eps*i, eps*j, eps*k, eps), writes 1 to
// CTRL (0x00), polls STATUS (0x04) until done (bit 1) is set, and reads
// T = P*Q from 0xC0..0xDC. axi4_byte_ram holds the registers; dq_mul (24
// multipliers, 64 adders) computes the product.
//
// Timing: the start pulse comes one cycle after the W beat that writes CTRL;
// dq_mul takes 4 cycles and the result is stored one cycle later, so done is
// visible on the fifth cycle after start. busy is high from the start pulse
// until the result is stored; a start while busy is ignored (a design choice).
module dq_ip
  import axi4_pkg::*;
  import fp32_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    aw_valid,
  output logic    aw_ready,
  input  axi_ax_t aw,
  input  logic    w_valid,
  output logic    w_ready,
  input  axi_w_t  w,
  output logic    b_valid,
  input  logic    b_ready,
  output axi_b_t  b,
  input  logic    ar_valid,
  output logic    ar_ready,
  input  axi_ax_t ar,
  output logic    r_valid,
  input  logic    r_ready,
  output axi_r_t  r
);

  logic   start, busy, go, res_valid;
  dquat_t opa, opb, res;

  axi4_byte_ram #(.NE(8)) u_ram (
    .clk, .rst_n,
    .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w, .b_valid, .b_ready, .b,
    .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r,
    .start_o(start), .busy_i(busy), .opa_o(opa), .opb_o(opb),
    .res_we_i(res_valid), .res_i(res)
  );

  assign go = start && !busy;

  dq_mul u_core (
    .clk, .rst_n, .in_valid(go), .p(opa), .q(opb), .out_valid(res_valid), .t(res)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)         busy <= 1'b0;
    else if (go)        busy <= 1'b1;
    else if (res_valid) busy <= 1'b0;
  end

endmodule
