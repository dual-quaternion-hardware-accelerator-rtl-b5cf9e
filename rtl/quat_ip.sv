// quat_ip: the Quaternion IP, an AXI4 slave that multiplies two quaternions.
//
// The host writes the four fp32 elements (w, x, y, z) of a to 0x40..0x4C and
// of b to 0x80..0x8C, writes 1 to CTRL (0x00), polls STATUS (0x04) until done
// (bit 1) is set, and reads c = a*b from 0xC0..0xCC. axi4_byte_ram holds the
// registers; quat_mul (8 multipliers) computes the product. A dual quaternion
// product takes three operations, Pr*Qr, Pr*Qd and Pd*Qr, and one quaternion
// addition by the host: slower than the Dual Quaternion IP, but smaller, and
// usable for plain quaternion work too.
//
// Timing: the start pulse comes one cycle after the W beat that writes CTRL;
// quat_mul takes 3 cycles and the result is stored one cycle later, so done is
// visible on the fourth cycle after start. busy is high from the start pulse
// until the result is stored; a start while busy is ignored (a design choice).
module quat_ip
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
  quat_t  opa, opb, res;

  axi4_byte_ram #(.NE(4)) u_ram (
    .clk, .rst_n,
    .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w, .b_valid, .b_ready, .b,
    .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r,
    .start_o(start), .busy_i(busy), .opa_o(opa), .opb_o(opb),
    .res_we_i(res_valid), .res_i(res)
  );

  assign go = start && !busy;

  quat_mul u_core (
    .clk, .rst_n, .in_valid(go), .a(opa), .b(opb), .out_valid(res_valid), .c(res)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)         busy <= 1'b0;
    else if (go)        busy <= 1'b1;
    else if (res_valid) busy <= 1'b0;
  end

endmodule
