// tb_quat_ip: end-to-end test of the Quaternion IP over AXI4.
//
// An AXI4 master model plays the host: it writes a and b as 4-beat bursts,
// writes CTRL, polls STATUS until done, and reads c as a 4-beat burst, with
// random response back-pressure. Checked: the published example
// (1,4,5,6) * (4,2,7,3) = (-57,-9,27,45) bit-exact, 100 random products
// against a double-precision reference, the 3-cycle core latency (start pulse
// to result store), and that a start arriving while the IP is busy is ignored.
module tb_quat_ip;
  import axi4_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0, cycle = 0;
  int   gos = 0, t_start = 0, latency = -1, busy_seen = 0;

  always #5 clk = ~clk;
  tb_axi_master m (.clk);

  quat_ip dut (
    .clk, .rst_n,
    .aw_valid(m.aw_valid), .aw_ready(m.aw_ready), .aw(m.aw),
    .w_valid(m.w_valid), .w_ready(m.w_ready), .w(m.w),
    .b_valid(m.b_valid), .b_ready(m.b_ready), .b(m.b),
    .ar_valid(m.ar_valid), .ar_ready(m.ar_ready), .ar(m.ar),
    .r_valid(m.r_valid), .r_ready(m.r_ready), .r(m.r)
  );

  always @(posedge clk) begin
    cycle++;
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

  task automatic run_op(input logic [31:0] a [$], input logic [31:0] b [$],
                        output logic [31:0] c [$]);
    logic [31:0] st;
    m.write_words(32'h40, a);
    m.write_words(32'h80, b);
    m.write_words(32'h00, '{32'h1});
    do begin
      m.read_word(32'h04, st);
      if (st[0]) busy_seen++;
    end while (!st[1]);
    m.read(32'hC0, 4, c);
  endtask

  function automatic logic [31:0] rnd_sp();
    return real2sp((real'($urandom % 2000001) - 1000000.0) / 125000.0);
  endfunction

  initial begin
    logic [31:0] a [$], b [$], c [$];
    rquat_t ra, rb, rc;
    real scale;
    int  g0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    m.stall_pct = 20;

    run_op('{32'h3f800000, 32'h40800000, 32'h40a00000, 32'h40c00000},
           '{32'h40800000, 32'h40000000, 32'h40e00000, 32'h40400000}, c);
    chk(c[0] == 32'hc2640000 && c[1] == 32'hc1100000 &&
        c[2] == 32'h41d80000 && c[3] == 32'h42340000,
        $sformatf("example %h %h %h %h", c[0], c[1], c[2], c[3]));
    chk(latency == 3, $sformatf("core latency %0d, expected 3", latency));

    for (int n = 0; n < 100; n++) begin
      a = {}; b = {};
      for (int e = 0; e < 4; e++) begin
        a.push_back(rnd_sp());
        b.push_back(rnd_sp());
        ra[e] = sp2real(a[e]);
        rb[e] = sp2real(b[e]);
      end
      run_op(a, b, c);
      rc = qmul(ra, rb);
      scale = 0.0;
      foreach (ra[e]) foreach (rb[f]) scale += fabs(ra[e] * rb[f]);
      for (int e = 0; e < 4; e++)
        chk(close(c[e], rc[e], scale, 1.0e-6),
            $sformatf("op %0d element %0d: %f expected %f", n, e, sp2real(c[e]), rc[e]));
    end

    g0 = gos;
    m.stall_pct = 0;
    fork
      m.write_words(32'h00, '{32'h1});
      begin
        @(posedge clk iff dut.start);
        force dut.u_ram.start_o = 1'b1;
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
