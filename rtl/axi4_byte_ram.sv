// axi4_byte_ram: the AXI4 slave "Byte-RAM" through which the host processor
// exchanges data with an accelerator.
//
// The host writes the two operands (NE fp32 words each) into the operand
// area, writes 1 to CTRL bit 0 to start, polls STATUS and reads the NE result
// words back (register map in axi4_pkg). Writes honour the byte strobes, so
// the area behaves as a byte-addressable memory. The accelerator sees all
// operand words in parallel (opa_o, opb_o), gets a one-cycle start_o pulse,
// reports busy_i, and stores its whole result with one res_we_i pulse, which
// also sets the done flag.
//
// AXI4 behaviour (design choices; the source publication says only that the IP is an
// AXI4 slave mapped into the host's memory): 32-bit beats; INCR and FIXED
// bursts up to 256 beats (WRAP is treated as INCR); one write burst and one
// read burst are served at a time, independently of each other; address
// channels are accepted only when the previous burst has finished; every
// response is OKAY; unmapped or read-only locations ignore writes and
// unmapped locations read as zero. Only the low 8 address bits are decoded.
// Write path: AW accepted -> W beats accepted one per cycle -> B. Read path:
// AR accepted -> R beats, one per cycle while r_ready is high; each beat is
// sampled from the register space when it is put on the channel.
// Synchronous active-low reset clears all state.
module axi4_byte_ram
  import axi4_pkg::*;
#(
  parameter int unsigned NE = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // AXI4 slave
  input  logic                 aw_valid,
  output logic                 aw_ready,
  input  axi_ax_t              aw,
  input  logic                 w_valid,
  output logic                 w_ready,
  input  axi_w_t               w,
  output logic                 b_valid,
  input  logic                 b_ready,
  output axi_b_t               b,
  input  logic                 ar_valid,
  output logic                 ar_ready,
  input  axi_ax_t              ar,
  output logic                 r_valid,
  input  logic                 r_ready,
  output axi_r_t               r,
  // accelerator side
  output logic                 start_o,
  input  logic                 busy_i,
  output logic [NE-1:0][31:0]  opa_o,
  output logic [NE-1:0][31:0]  opb_o,
  input  logic                 res_we_i,
  input  logic [NE-1:0][31:0]  res_i
);

  localparam int unsigned IW = $clog2(NE) > 0 ? $clog2(NE) : 1;

  // storage
  logic [NE-1:0][31:0] opa_q, opb_q, res_q;
  logic                done_q;

  // write channel state
  typedef enum logic [1:0] {W_IDLE, W_DATA, W_RESP} wstate_e;
  wstate_e                 wstate;
  logic [7:0]              waddr;
  burst_e                  wburst;
  logic [AXI_ID_W-1:0]     wid;

  // read channel state
  logic                    rbusy;
  logic [7:0]              raddr;
  burst_e                  rburst;
  logic [7:0]              rcount;
  logic [AXI_ID_W-1:0]     rid;

  assign aw_ready = (wstate == W_IDLE);
  assign w_ready  = (wstate == W_DATA);
  assign b_valid  = (wstate == W_RESP);
  assign b        = '{id: wid, resp: RESP_OKAY};
  assign ar_ready = !rbusy;
  assign r_valid  = rbusy;

  assign opa_o = opa_q;
  assign opb_o = opb_q;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] strb);
    for (int i = 0; i < 4; i++)
      if (strb[i]) old[8*i +: 8] = nw[8*i +: 8];
    return old;
  endfunction

  function automatic logic in_area(input logic [7:0] addr, input logic [7:0] base);
    return (addr >= base) && (32'(addr) < 32'(base) + 4 * NE);
  endfunction

  function automatic logic [IW-1:0] widx(input logic [7:0] addr);
    return IW'(addr[7:2] & 6'h0f);
  endfunction

  // read data of a location; the beat on the R channel is registered so that
  // it stays stable while r_ready is low
  function automatic logic [31:0] read_word(input logic [7:0] addr,
                                            input logic [NE-1:0][31:0] a,
                                            input logic [NE-1:0][31:0] bb,
                                            input logic [NE-1:0][31:0] c,
                                            input logic done, input logic busy);
    if (addr[7:2] == REG_STATUS[7:2])  return {30'd0, done, busy};
    else if (in_area(addr, BASE_OPA))  return a[widx(addr)];
    else if (in_area(addr, BASE_OPB))  return bb[widx(addr)];
    else if (in_area(addr, BASE_RES))  return c[widx(addr)];
    else                               return 32'd0;
  endfunction

  logic [31:0] rdata_q;
  logic [7:0]  raddr_nxt;
  assign raddr_nxt = (rburst != BURST_FIXED) ? raddr + 8'd4 : raddr;
  assign r = '{id: rid, data: rdata_q, resp: RESP_OKAY, last: (rcount == 8'd0)};

  logic wfire;
  assign wfire = w_valid && w_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wstate  <= W_IDLE;
      waddr   <= '0;
      wburst  <= BURST_INCR;
      wid     <= '0;
      rbusy   <= 1'b0;
      raddr   <= '0;
      rburst  <= BURST_INCR;
      rcount  <= '0;
      rid     <= '0;
      rdata_q <= '0;
      opa_q   <= '0;
      opb_q   <= '0;
      res_q   <= '0;
      done_q  <= 1'b0;
      start_o <= 1'b0;
    end else begin
      start_o <= 1'b0;

      // write channel
      unique case (wstate)
        W_IDLE: if (aw_valid) begin
          waddr  <= aw.addr[7:0];
          wburst <= aw.burst;
          wid    <= aw.id;
          wstate <= W_DATA;
        end
        W_DATA: if (wfire) begin
          if (waddr[7:2] == REG_CTRL[7:2]) begin
            if (w.strb[0] && w.data[0]) start_o <= 1'b1;
          end else if (in_area(waddr, BASE_OPA)) begin
            opa_q[widx(waddr)] <= merge(opa_q[widx(waddr)], w.data, w.strb);
          end else if (in_area(waddr, BASE_OPB)) begin
            opb_q[widx(waddr)] <= merge(opb_q[widx(waddr)], w.data, w.strb);
          end
          if (wburst != BURST_FIXED) waddr <= waddr + 8'd4;
          if (w.last) wstate <= W_RESP;
        end
        W_RESP: if (b_ready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase

      // read channel
      if (!rbusy) begin
        if (ar_valid) begin
          rbusy  <= 1'b1;
          raddr  <= ar.addr[7:0];
          rburst <= ar.burst;
          rcount <= ar.len;
          rid    <= ar.id;
          rdata_q <= read_word(ar.addr[7:0], opa_q, opb_q, res_q, done_q, busy_i);
        end
      end else if (r_ready) begin
        if (rcount == 8'd0) rbusy <= 1'b0;
        rcount <= rcount - 8'd1;
        raddr  <= raddr_nxt;
        rdata_q <= read_word(raddr_nxt, opa_q, opb_q, res_q, done_q, busy_i);
      end

      // accelerator side: results and done flag
      if (res_we_i) begin
        res_q  <= res_i;
        done_q <= 1'b1;
      end else if (start_o) begin
        done_q <= 1'b0;
      end
    end
  end

  // AXI4 rules for the channels this slave drives: a valid response stays
  // valid and unchanged until it is accepted.
  a_b_stable: assert property (@(posedge clk) disable iff (!rst_n)
    b_valid && !b_ready |=> b_valid && $stable(b));
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
    r_valid && !r_ready |=> r_valid && $stable(r));

endmodule
