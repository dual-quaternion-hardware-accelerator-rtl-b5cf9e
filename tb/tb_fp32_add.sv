// tb_fp32_add: self-checking test of the single-precision adder/subtractor.
//
// Random operands with exponents within 28 of each other are added and
// subtracted; the expected result is the exact sum in double precision rounded
// once to single precision, which is the correctly rounded IEEE result because
// the double sum is exact for such operands. Directed cases cover signed zeros,
// exact cancellation, infinities, NaN, overflow, a far smaller operand, a
// subnormal input (read as zero) and ties to even.
module tb_fp32_add;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  fp32_t a, b, y;
  logic  sub;
  int    checks = 0, failures = 0;

  fp32_add dut (.a, .b, .sub, .y);

  function automatic fp32_t rnd_fp(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + ($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  function automatic fp32_t ref_add(input fp32_t x, input fp32_t z, input logic s);
    real rx, rz;
    rx = sp2real(x);
    rz = sp2real(z);
    return real2sp(s ? rx - rz : rx + rz);
  endfunction

  task automatic check(input fp32_t x, input fp32_t z, input logic s, input fp32_t exp);
    a = x; b = z; sub = s;
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %h %s %h: got %h expected %h", x, s ? "-" : "+", z, y, exp);
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
    fp32_t x, z;
    logic s;
    // directed cases
    check(32'h3f800000, 32'h3f800000, 1'b0, 32'h40000000);  // 1 + 1 = 2
    check(32'h3f800000, 32'h3f800000, 1'b1, 32'h00000000);  // 1 - 1 = +0
    check(32'h80000000, 32'h80000000, 1'b0, 32'h80000000);  // -0 + -0 = -0
    check(32'h00000000, 32'h80000000, 1'b0, 32'h00000000);  // +0 + -0 = +0
    check(32'h40490fdb, 32'h00000000, 1'b0, 32'h40490fdb);  // x + 0 = x
    check(32'h00000000, 32'h40490fdb, 1'b1, 32'hc0490fdb);  // 0 - x = -x
    check(32'h7f800000, 32'h3f800000, 1'b0, 32'h7f800000);  // inf + 1
    check(32'h7f800000, 32'h7f800000, 1'b1, FP32_QNAN);     // inf - inf
    check(32'h7fc00001, 32'h3f800000, 1'b0, FP32_QNAN);     // NaN + 1
    check(32'h7f7fffff, 32'h7f7fffff, 1'b0, 32'h7f800000);  // overflow
    check(32'h3f800000, 32'h33000000, 1'b0, 32'h3f800000);  // 1 + 2^-25
    check(32'h3f800000, 32'h33800000, 1'b0, 32'h3f800000);  // 1 + 2^-24, tie to even
    check(32'h3f800001, 32'h33800000, 1'b0, 32'h3f800002);  // tie rounds up to even
    check(32'h3f800000, 32'h00400000, 1'b0, 32'h3f800000);  // subnormal input reads as 0
    check(32'h3f800000, 32'h0d800000, 1'b1, 32'h3f800000);  // 1 - 2^-100 rounds to 1
    check(32'h3f800000, 32'h33800000, 1'b1, 32'h3f7fffff);  // 1 - 2^-24 exact
    check(32'h3f800000, 32'h33000000, 1'b1, 32'h3f800000);  // 1 - 2^-25, tie to even
    // random cases
    for (int i = 0; i < 20000; i++) begin
      x = rnd_fp(100, 150);
      z = rnd_fp(100, 150);
      if ((x[30:23] > z[30:23] ? x[30:23] - z[30:23] : z[30:23] - x[30:23]) > 28)
        z[30:23] = x[30:23] - 8'(i % 20);
      s = 1'($urandom);
      check(x, z, s, ref_add(x, z, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
