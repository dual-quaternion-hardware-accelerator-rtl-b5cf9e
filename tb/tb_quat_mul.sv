// tb_quat_mul: self-checking test of the pipelined quaternion product.
//
// 1. The published example (1,4,5,6) * (4,2,7,3) = (-57,-9,27,45), exact.
// 2. Latency: out_valid must follow a single in_valid by exactly 3 cycles.
// 3. 2000 random products issued back to back, one per cycle, compared in
//    order with the Hamilton product computed in double precision; the error
//    must stay within 1e-6 of the sum of the magnitudes of the terms.
module tb_quat_mul;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 2000;
  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  quat_t a = '0, b = '0, c;
  int    checks = 0, failures = 0;
  int    cycle = 0;

  quat_mul dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .c);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rquat_t ra [N], rb [N];

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
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // published example and latency
    a <= {32'h40c00000, 32'h40a00000, 32'h40800000, 32'h3f800000};
    b <= {32'h40400000, 32'h40e00000, 32'h40000000, 32'h40800000};
    in_valid <= 1'b1;
    @(posedge clk);
    t0 = cycle;
    in_valid <= 1'b0;
    while (!out_valid) @(posedge clk);
    chk(cycle - t0 == 3, $sformatf("latency %0d, expected 3", cycle - t0));
    chk(c == {32'h42340000, 32'h41d80000, 32'hc1100000, 32'hc2640000},
        $sformatf("example product %h", c));
    @(posedge clk);
    chk(!out_valid, "out_valid longer than one cycle");

    // random back-to-back products
    fork
      begin
        for (int i = 0; i < N; i++) begin
          quat_t x, y;
          for (int e = 0; e < 4; e++) begin
            x[e] = rnd_sp();
            y[e] = rnd_sp();
            ra[i][e] = sp2real(x[e]);
            rb[i][e] = sp2real(y[e]);
          end
          a <= x; b <= y; in_valid <= 1'b1;
          @(posedge clk);
        end
        in_valid <= 1'b0;
      end
      begin
        k = 0;
        while (k < N) begin
          @(posedge clk);
          if (out_valid) begin
            rquat_t r;
            real scale;
            r = qmul(ra[k], rb[k]);
            scale = 0.0;
            for (int e = 0; e < 4; e++)
              for (int f = 0; f < 4; f++) scale += fabs(ra[k][e] * rb[k][f]);
            for (int e = 0; e < 4; e++)
              chk(close(c[e], r[e], scale, 1.0e-6),
                  $sformatf("product %0d element %0d: got %h (%f) expected %f",
                            k, e, c[e], sp2real(c[e]), r[e]));
            k++;
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
