// tb_dq_ip: end-to-end test of the Dual Quaternion IP over AXI4.
//
// An AXI4 master model plays the host: it writes P and Q as 8-beat bursts,
// writes CTRL, polls STATUS until done, and reads T as an 8-beat burst, with
// random response back-pressure. Checked: the published example (P = 1..8,
// Q = 0.1..0.8), 100 random products against a double-precision reference,
// the 4-cycle core latency (start pulse to result store), the done flag, and
// that a start arriving while the IP is busy is ignored.
module tb_dq_ip;
  import axi4_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0, cycle = 0;
  int   starts = 0, gos = 0, t_start = 0, latency = -1, busy_seen = 0;

  always #5 clk = ~clk;
  tb_axi_master m (.clk);

  dq_ip dut (
    .clk, .rst_n,
    .aw_valid(m.aw_valid), .aw_ready(m.aw_ready), .aw(m.aw),
    .w_valid(m.w_valid), .w_ready(m.w_ready), .w(m.w),
    .b_valid(m.b_valid), .b_ready(m.b_ready), .b(m.b),
    .ar_valid(m.ar_valid), .ar_ready(m.ar_ready), .ar(m.ar),
    .r_valid(m.r_valid), .r_ready(m.r_ready), .r(m.r)
  );

  // observe the internal start and completion to measure the core latency
  always @(posedge clk) begin
    cycle++;
    if (rst_n && dut.start) starts++;
    if (rst_n && dut.go) begin
      gos++;
      t_start = cycle;
    end
    if (rst_n && dut.res_valid) latency = cycle - t_start;
  end

  initial begin
    #2000000;
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

  task automatic run_op(input logic [31:0] p [$], input logic [31:0] q [$],
                        output logic [31:0] t [$]);
    logic [31:0] st;
    m.write_words(32'h40, p);
    m.write_words(32'h80, q);
    m.write_words(32'h00, '{32'h1});
    do begin
      m.read_word(32'h04, st);
      if (st[0]) busy_seen++;
    end while (!st[1]);
    m.read(32'hC0, 8, t);
  endtask

  function automatic logic [31:0] rnd_sp();
    return real2sp((real'($urandom % 2000001) - 1000000.0) / 125000.0);
  endfunction

  initial begin
    logic [31:0] p [$], q [$], t [$];
    rdquat_t rp, rq, rt;
    real fig [8];
    real scale;
    int  s0, g0;
    fig = '{-2.8, 0.4, 0.6, 0.8, 4.2, 6.0, 7.8, -9.6};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    m.stall_pct = 20;

    // published example
    for (int e = 0; e < 8; e++) begin
      p.push_back(real2sp(real'(e + 1)));
      q.push_back(real2sp(real'(e + 1) / 10.0));
    end
    run_op(p, q, t);
    for (int e = 0; e < 8; e++)
      chk(close(t[e], fig[e], 10.0, 1.0e-6),
          $sformatf("example element %0d: %f expected %f", e, sp2real(t[e]), fig[e]));
    chk(latency == 4, $sformatf("core latency %0d, expected 4", latency));

    // random products
    for (int n = 0; n < 100; n++) begin
      p = {}; q = {};
      for (int e = 0; e < 8; e++) begin
        p.push_back(rnd_sp());
        q.push_back(rnd_sp());
        rp[e] = sp2real(p[e]);
        rq[e] = sp2real(q[e]);
      end
      run_op(p, q, t);
      rt = dqmul(rp, rq);
      scale = 0.0;
      foreach (rp[e]) foreach (rq[f]) scale += fabs(rp[e] * rq[f]);
      for (int e = 0; e < 8; e++)
        chk(close(t[e], rt[e], scale, 1.0e-6),
            $sformatf("op %0d element %0d: %f expected %f", n, e, sp2real(t[e]), rt[e]));
    end

    // a second start while busy is ignored
    s0 = starts; g0 = gos;
    m.stall_pct = 0;
    fork
      m.write_words(32'h00, '{32'h1});
      begin
        @(posedge clk iff dut.start);
        force dut.u_ram.start_o = 1'b1;   // hold start high for two more cycles
        @(posedge clk);
        @(posedge clk);
        release dut.u_ram.start_o;
      end
    join
    repeat (10) @(posedge clk);
    chk(gos - g0 == 1, $sformatf("start while busy: %0d operations began", gos - g0));

    chk(busy_seen > 0, "busy status observed");
    chk(m.errors == 0, $sformatf("%0d AXI response errors", m.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
