// tb_fp32_mul: self-checking test of the single-precision multiplier.
//
// The product of two single-precision values is exact in double precision, so
// rounding it once to single precision gives the correctly rounded reference.
// Random operands are drawn with exponents that keep the product normal;
// directed cases cover zeros, infinities, 0 * inf, NaN, overflow, underflow to
// zero and a subnormal input.
module tb_fp32_mul;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  fp32_t a, b, y;
  int    checks = 0, failures = 0;

  fp32_mul dut (.a, .b, .y);

  function automatic fp32_t rnd_fp(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + ($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  function automatic fp32_t ref_mul(input fp32_t x, input fp32_t z);
    return real2sp(sp2real(x) * sp2real(z));
  endfunction

  task automatic check(input fp32_t x, input fp32_t z, input fp32_t exp);
    a = x; b = z;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %h * %h: got %h expected %h", x, z, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3fc00000, 32'h40000000, 32'h40400000);  // 1.5 * 2 = 3
    check(32'hbf800000, 32'h3f800000, 32'hbf800000);  // -1 * 1
    check(32'h00000000, 32'hc0000000, 32'h80000000);  // 0 * -2 = -0
    check(32'h7f800000, 32'hc0000000, 32'hff800000);  // inf * -2
    check(32'h7f800000, 32'h00000000, FP32_QNAN);     // inf * 0
    check(32'h7fc00000, 32'h3f800000, FP32_QNAN);     // NaN * 1
    check(32'h7f000000, 32'h40000000, 32'h7f800000);  // 2^127 * 2 overflows
    check(32'h00800000, 32'h3f000000, 32'h00000000);  // 2^-126 * 0.5 flushes to 0
    check(32'h00400000, 32'h4b000000, 32'h00000000);  // subnormal input reads as 0
    check(32'h3f800001, 32'h3f800001, 32'h3f800002);  // (1+u)^2 rounds to 1+2u
    check(32'h3dcccccd, 32'h41200000, 32'h3f800000);  // 0.1 * 10 = 1
    for (int i = 0; i < 20000; i++) begin
      fp32_t x, z;
      x = rnd_fp(70, 180);
      z = rnd_fp(70, 180);
      check(x, z, ref_mul(x, z));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
