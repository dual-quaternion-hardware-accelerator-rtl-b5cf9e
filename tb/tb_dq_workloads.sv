// tb_dq_workloads: the kinematics workloads run through the accelerators.
//
// The host (an AXI4 master model) uses the Dual Quaternion IP for:
//  - multiplication: 100 dual quaternion products, also done on the
//    Quaternion IP (three quaternion products and one host addition each);
//  - translation:    a point 1 + eps*p moved by d with D = 1 + eps*d/2,
//                    p' = D p conj(D);
//  - rotation:       the point rotated by the unit quaternion r, p' = r p conj(r);
//  - transformation: C = R*D, then p' = C p conj(C). With p = (3,4,5),
//                    d = (4,2,6) and roll/pitch/yaw = 180/0/0 degrees the
//                    expected point is (7,-6,-11).
// conj() is the dual quaternion conjugate that flips the signs of the real
// part's vector and of the dual part's scalar. Every result is checked against
// a double-precision reference, the transformation also against the expected
// point. The host cycles per operation, measured at the AXI4 port with a
// zero-wait-state master, are printed for each IP.
module tb_dq_workloads;
  import axi4_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;
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

  initial begin
    #20000000;
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

  function automatic rdquat_t conj(input rdquat_t x);
    return '{x[0], -x[1], -x[2], -x[3], x[4], x[5], x[6], -x[7]};
  endfunction

  // one product on the Dual Quaternion IP
  task automatic hw_dqmul(input rdquat_t p, input rdquat_t q, output rdquat_t t);
    logic [31:0] pw [$], qw [$], d [$], st;
    foreach (p[i]) begin
      pw.push_back(real2sp(p[i]));
      qw.push_back(real2sp(q[i]));
    end
    mdq.write_words(32'h40, pw);
    mdq.write_words(32'h80, qw);
    mdq.write_words(32'h00, '{32'h1});
    do mdq.read_word(32'h04, st); while (!st[1]);
    mdq.read(32'hC0, 8, d);
    foreach (t[i]) t[i] = sp2real(d[i]);
  endtask

  // one quaternion product on the Quaternion IP
  task automatic hw_qmul(input real a [4], input real b [4], output real c [4]);
    logic [31:0] d [$], aw [$], bw [$], st;
    foreach (a[i]) begin
      aw.push_back(real2sp(a[i]));
      bw.push_back(real2sp(b[i]));
    end
    mq.write_words(32'h40, aw);
    mq.write_words(32'h80, bw);
    mq.write_words(32'h00, '{32'h1});
    do mq.read_word(32'h04, st); while (!st[1]);
    mq.read(32'hC0, 4, d);
    foreach (c[i]) c[i] = sp2real(d[i]);
  endtask

  // dual quaternion product from three Quaternion IP products
  task automatic hw_dqmul_by_q(input rdquat_t p, input rdquat_t q, output rdquat_t t);
    real c0 [4], c1 [4], c2 [4];
    hw_qmul('{p[0], p[1], p[2], p[3]}, '{q[0], q[1], q[2], q[3]}, c0);
    hw_qmul('{p[0], p[1], p[2], p[3]}, '{q[7], q[4], q[5], q[6]}, c1);
    hw_qmul('{p[7], p[4], p[5], p[6]}, '{q[0], q[1], q[2], q[3]}, c2);
    t = '{c0[0], c0[1], c0[2], c0[3], c1[1] + c2[1], c1[2] + c2[2], c1[3] + c2[3],
          c1[0] + c2[0]};
  endtask

  task automatic expect_dq(input rdquat_t got, input rdquat_t exp, input real tol,
                           input string what);
    for (int e = 0; e < 8; e++)
      chk(fabs(got[e] - exp[e]) <= tol,
          $sformatf("%s element %0d: %f expected %f", what, e, got[e], exp[e]));
  endtask

  function automatic real rnd();
    return (real'($urandom % 2000001) - 1000000.0) / 250000.0;
  endfunction

  initial begin
    rdquat_t p, q, t, ref_t, pt, d, r, c, c1;
    int t0, cyc_dq, cyc_q;
    real half = 0.7071067811865476;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // multiplication, 100 iterations on each IP
    cyc_dq = 0; cyc_q = 0;
    for (int n = 0; n < 100; n++) begin
      foreach (p[i]) begin
        p[i] = sp2real(real2sp(rnd()));
        q[i] = sp2real(real2sp(rnd()));
      end
      ref_t = dqmul(p, q);
      t0 = cycle;
      hw_dqmul(p, q, t);
      cyc_dq += cycle - t0;
      expect_dq(t, ref_t, 1.0e-4, $sformatf("DQ IP product %0d", n));
      t0 = cycle;
      hw_dqmul_by_q(p, q, t);
      cyc_q += cycle - t0;
      expect_dq(t, ref_t, 1.0e-4, $sformatf("Q IP product %0d", n));
    end
    $display("multiplication: %0d cycles per product on the Dual Quaternion IP, %0d on the Quaternion IP (AXI4 port, host arithmetic not counted)",
             cyc_dq / 100, cyc_q / 100);

    pt = '{1.0, 0.0, 0.0, 0.0, 3.0, 4.0, 5.0, 0.0};     // point (3,4,5)
    d  = '{1.0, 0.0, 0.0, 0.0, 2.0, 1.0, 3.0, 0.0};     // translation by (4,2,6)
    r  = '{0.0, 1.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0};     // roll 180 degrees

    // translation
    hw_dqmul(d, pt, t);
    hw_dqmul(t, conj(d), t);
    expect_dq(t, '{1.0, 0.0, 0.0, 0.0, 7.0, 6.0, 11.0, 0.0}, 1.0e-5, "translation");

    // rotation: 180 degrees about x, then 90 degrees about z
    hw_dqmul(r, pt, t);
    hw_dqmul(t, conj(r), t);
    expect_dq(t, '{1.0, 0.0, 0.0, 0.0, 3.0, -4.0, -5.0, 0.0}, 1.0e-5, "rotation about x");
    c = '{half, 0.0, 0.0, half, 0.0, 0.0, 0.0, 0.0};
    hw_dqmul(c, pt, t);
    hw_dqmul(t, conj(c), t);
    expect_dq(t, '{1.0, 0.0, 0.0, 0.0, -4.0, 3.0, 5.0, 0.0}, 1.0e-5, "rotation about z");

    // transformation: translate by (4,2,6), then roll 180 degrees
    hw_dqmul(r, d, c);
    ref_t = dqmul(r, d);
    expect_dq(c, ref_t, 1.0e-6, "transformation C = R*D");
    hw_dqmul(c, pt, c1);
    hw_dqmul(c1, conj(c), t);
    expect_dq(t, '{1.0, 0.0, 0.0, 0.0, 7.0, -6.0, -11.0, 0.0}, 1.0e-5, "transformation");
    $display("transformation result (%f %fi %fj %fk) + (%fe %fie %fje %fke)",
             t[0], t[1], t[2], t[3], t[7], t[4], t[5], t[6]);

    chk(mdq.errors == 0 && mq.errors == 0, "AXI response errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
