// tb_dq_accel_top: end-to-end test of both accelerators at their default
// configuration.
//
// Two AXI4 master models play the host, one per slave port. For a set of
// random dual quaternion pairs the product P*Q is computed twice: in one
// operation on the Dual Quaternion IP, and on the Quaternion IP as three
// quaternion products Pr*Qr, Pr*Qd, Pd*Qr whose last two the host adds (the
// dual part is Pr*Qd + Pd*Qr since eps^2 = 0). Both must match a
// double-precision reference. The test also counts each mechanism of the
// design and fails if one never happened: burst transfers, byte-strobe
// writes, response back-pressure, busy seen while polling, the done flag
// cleared by a new start, a start ignored while busy, and AXI4 traffic on both
// ports at the same time.
module tb_dq_accel_top;
  import axi4_pkg::*;
  import tb_fp_pkg::*;

  localparam int NOPS = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;
  int   n_dq_ops = 0, n_q_ops = 0, n_strobe = 0, n_busy = 0, n_done_clear = 0;
  int   n_ignored = 0, n_overlap = 0;

  always #5 clk = ~clk;
  tb_axi_master mdq (.clk);
  tb_axi_master mq  (.clk);

  dq_accel_top dut (
    .clk, .rst_n,
    .dq_aw_valid(mdq.aw_valid), .dq_aw_ready(mdq.aw_ready), .dq_aw(mdq.aw),
    .dq_w_valid(mdq.w_valid),   .dq_w_ready(mdq.w_ready),   .dq_w(mdq.w),
    .dq_b_valid(mdq.b_valid),   .dq_b_ready(mdq.b_ready),   .dq_b(mdq.b),
    .dq_ar_valid(mdq.ar_valid), .dq_ar_ready(mdq.ar_ready), .dq_ar(mdq.ar),
    .dq_r_valid(mdq.r_valid),   .dq_r_ready(mdq.r_ready),   .dq_r(mdq.r),
    .q_aw_valid(mq.aw_valid), .q_aw_ready(mq.aw_ready), .q_aw(mq.aw),
    .q_w_valid(mq.w_valid),   .q_w_ready(mq.w_ready),   .q_w(mq.w),
    .q_b_valid(mq.b_valid),   .q_b_ready(mq.b_ready),   .q_b(mq.b),
    .q_ar_valid(mq.ar_valid), .q_ar_ready(mq.ar_ready), .q_ar(mq.ar),
    .q_r_valid(mq.r_valid),   .q_r_ready(mq.r_ready),   .q_r(mq.r)
  );

  always @(posedge clk)
    if (rst_n && (mdq.aw_valid || mdq.w_valid || mdq.ar_valid || mdq.r_valid) &&
        (mq.aw_valid || mq.w_valid || mq.ar_valid || mq.r_valid))
      n_overlap++;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] rnd_sp();
    return real2sp((real'($urandom % 2000001) - 1000000.0) / 125000.0);
  endfunction


  task automatic dq_op(input logic [31:0] p [$], input logic [31:0] q [$],
                       output logic [31:0] t [$]);
    logic [31:0] st;
    logic [31:0] lo [$], hi [$];
    logic [3:0]  slo [$], shi [$];
    // operand P goes in with two half-word strobed bursts per element pair
    // for every fourth operation, plain bursts otherwise
    if (n_dq_ops % 4 == 3) begin
      foreach (p[i]) begin
        lo.push_back(p[i]); slo.push_back(4'b0011);
        hi.push_back(p[i]); shi.push_back(4'b1100);
      end
      mdq.write(32'h40, lo, slo);
      mdq.write(32'h40, hi, shi);
      n_strobe++;
    end else begin
      mdq.write_words(32'h40, p);
    end
    mdq.write_words(32'h80, q);
    mdq.write_words(32'h00, '{32'h1});
    mdq.read_word(32'h04, st);
    if (!st[1] && n_dq_ops > 0) n_done_clear++;
    while (!st[1]) begin
      if (st[0]) n_busy++;
      mdq.read_word(32'h04, st);
    end
    mdq.read(32'hC0, 8, t);
    n_dq_ops++;
  endtask

  task automatic q_op(input logic [31:0] a [$], input logic [31:0] b [$],
                      output logic [31:0] c [$]);
    logic [31:0] st;
    mq.write_words(32'h40, a);
    mq.write_words(32'h80, b);
    mq.write_words(32'h00, '{32'h1});
    mq.read_word(32'h04, st);
    if (!st[1] && n_q_ops > 0) n_done_clear++;
    while (!st[1]) begin
      if (st[0]) n_busy++;
      mq.read_word(32'h04, st);
    end
    mq.read(32'hC0, 4, c);
    n_q_ops++;
  endtask

  // dual quaternion product on the Quaternion IP, following T = Pr Qr + eps (Pr Qd + Pd Qr)
  task automatic dq_by_quat(input logic [31:0] p [$], input logic [31:0] q [$],
                            output real t [8]);
    logic [31:0] pr [$], pd [$], qr [$], qd [$], c0 [$], c1 [$], c2 [$];
    pr = '{p[0], p[1], p[2], p[3]};
    pd = '{p[7], p[4], p[5], p[6]};
    qr = '{q[0], q[1], q[2], q[3]};
    qd = '{q[7], q[4], q[5], q[6]};
    q_op(pr, qr, c0);
    q_op(pr, qd, c1);
    q_op(pd, qr, c2);
    t[0] = sp2real(c0[0]); t[1] = sp2real(c0[1]);
    t[2] = sp2real(c0[2]); t[3] = sp2real(c0[3]);
    t[7] = sp2real(c1[0]) + sp2real(c2[0]);
    t[4] = sp2real(c1[1]) + sp2real(c2[1]);
    t[5] = sp2real(c1[2]) + sp2real(c2[2]);
    t[6] = sp2real(c1[3]) + sp2real(c2[3]);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    mdq.stall_pct = 25;
    mq.stall_pct  = 25;

    for (int n = 0; n < NOPS; n++) begin
      logic [31:0] p [$], q [$], t [$];
      rdquat_t rp, rq, rt;
      real tq [8];
      real scale;
      p = {};
      q = {};
      for (int e = 0; e < 8; e++) begin
        p.push_back(rnd_sp());
        q.push_back(rnd_sp());
        rp[e] = sp2real(p[e]);
        rq[e] = sp2real(q[e]);
      end
      rt = dqmul(rp, rq);
      scale = 0.0;
      foreach (rp[e]) foreach (rq[f]) scale += fabs(rp[e] * rq[f]);
      fork
        dq_op(p, q, t);
        dq_by_quat(p, q, tq);
      join
      for (int e = 0; e < 8; e++) begin
        chk(close(t[e], rt[e], scale, 1.0e-6),
            $sformatf("DQ IP op %0d element %0d: %f expected %f", n, e, sp2real(t[e]), rt[e]));
        chk(fabs(tq[e] - rt[e]) <= 2.0e-6 * scale,
            $sformatf("Q IP op %0d element %0d: %f expected %f", n, e, tq[e], rt[e]));
      end
    end

    // a start while an operation is in flight is ignored on both IPs
    begin
      int g_dq, g_q;
      g_dq = 0; g_q = 0;
      mdq.stall_pct = 0;
      mq.stall_pct  = 0;
      fork
        mdq.write_words(32'h00, '{32'h1});
        mq.write_words(32'h00, '{32'h1});
        begin
          @(posedge clk iff dut.u_dq_ip.start);
          force dut.u_dq_ip.u_ram.start_o = 1'b1;
          force dut.u_quat_ip.u_ram.start_o = 1'b1;
          repeat (2) begin
            @(posedge clk);
            if (dut.u_dq_ip.go) g_dq++;
            if (dut.u_quat_ip.go) g_q++;
          end
          release dut.u_dq_ip.u_ram.start_o;
          release dut.u_quat_ip.u_ram.start_o;
        end
      join
      if (g_dq == 0) n_ignored++;
      if (g_q == 0) n_ignored++;
    end

    $display("mechanisms: dq_ops=%0d q_ops=%0d bursts=%0d strobe_writes=%0d backpressure=%0d busy_polls=%0d done_cleared=%0d start_ignored=%0d both_ports_active=%0d",
             n_dq_ops, n_q_ops, mdq.bursts + mq.bursts, n_strobe,
             mdq.ready_stalls + mq.ready_stalls, n_busy, n_done_clear, n_ignored, n_overlap);
    chk(n_dq_ops == NOPS, "dual quaternion IP operations");
    chk(n_q_ops == 3 * NOPS, "quaternion IP operations");
    chk(mdq.bursts > 0 && mq.bursts > 0, "burst transfers on both ports");
    chk(n_strobe > 0, "byte-strobe writes");
    chk(mdq.ready_stalls > 0 && mq.ready_stalls > 0, "response back-pressure on both ports");
    chk(n_busy > 0, "busy seen while polling");
    chk(n_done_clear > 0, "done cleared by a new start");
    chk(n_ignored == 2, "start ignored while busy on both IPs");
    chk(n_overlap > 0, "both ports active at once");
    chk(mdq.errors == 0 && mq.errors == 0, "AXI response errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
