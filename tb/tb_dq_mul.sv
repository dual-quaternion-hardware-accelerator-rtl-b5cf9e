// tb_dq_mul: self-checking test of the pipelined dual quaternion product.
//
// 1. The published example P = (1,...,8), Q = (0.1,...,0.8): the result must
//    be close to (-2.8, 0.4, 0.6, 0.8, 4.2, 6.0, 7.8, -9.6), and bit-exact
//    with an independent single-precision model of the same 24-multiplication
//    schedule (the constants below).
// 2. Latency: out_valid must follow a single in_valid by exactly 4 cycles.
// 3. 2000 random products issued back to back, compared in order with the dual
//    quaternion product computed in double precision from its definition.
module tb_dq_mul;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 2000;
  logic   clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  dquat_t p = '0, q = '0, t;
  int     checks = 0, failures = 0;
  int     cycle = 0;

  dq_mul dut (.clk, .rst_n, .in_valid, .p, .q, .out_valid, .t);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rdquat_t rp [N], rq [N];

  function automatic logic [31:0] rnd_sp();
    return real2sp((real'($urandom % 2000001) - 1000000.0) / 125000.0);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int t0, k;
    real fig [8];
    logic [31:0] model [8];
    fig   = '{-2.8, 0.4, 0.6, 0.8, 4.2, 6.0, 7.8, -9.6};
    model = '{32'hc0333333, 32'h3eccccce, 32'h3f199998, 32'h3f4ccccd,
              32'h40866667, 32'h40c00001, 32'h40f9999b, 32'hc1199999};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    for (int e = 0; e < 8; e++) begin
      p[e] <= real2sp(real'(e + 1));
      q[e] <= real2sp(real'(e + 1) / 10.0);
    end
    in_valid <= 1'b1;
    @(posedge clk);
    t0 = cycle;
    in_valid <= 1'b0;
    while (!out_valid) @(posedge clk);
    chk(cycle - t0 == 4, $sformatf("latency %0d, expected 4", cycle - t0));
    for (int e = 0; e < 8; e++) begin
      chk(close(t[e], fig[e], 10.0, 1.0e-6),
          $sformatf("example element %0d: %f expected %f", e, sp2real(t[e]), fig[e]));
      chk(t[e] == model[e], $sformatf("example element %0d: %h expected %h", e, t[e], model[e]));
    end
    @(posedge clk);
    chk(!out_valid, "out_valid longer than one cycle");

    fork
      begin
        for (int i = 0; i < N; i++) begin
          dquat_t x, y;
          for (int e = 0; e < 8; e++) begin
            x[e] = rnd_sp();
            y[e] = rnd_sp();
            rp[i][e] = sp2real(x[e]);
            rq[i][e] = sp2real(y[e]);
          end
          p <= x; q <= y; in_valid <= 1'b1;
          @(posedge clk);
        end
        in_valid <= 1'b0;
      end
      begin
        k = 0;
        while (k < N) begin
          @(posedge clk);
          if (out_valid) begin
            rdquat_t r;
            real scale;
            r = dqmul(rp[k], rq[k]);
            scale = 0.0;
            for (int e = 0; e < 8; e++)
              for (int f = 0; f < 8; f++) scale += fabs(rp[k][e] * rq[k][f]);
            for (int e = 0; e < 8; e++)
              chk(close(t[e], r[e], scale, 1.0e-6),
                  $sformatf("product %0d element %0d: got %h (%f) expected %f",
                            k, e, t[e], sp2real(t[e]), r[e]));
            k++;
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
