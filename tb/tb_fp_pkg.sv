// tb_fp_pkg: reference arithmetic for the testbenches.
//
// sp2real() widens a single-precision bit pattern to a double-precision real
// (subnormals read as zero, like the design). real2sp() rounds a real to the
// nearest single-precision value, ties to even, working on the double's bit
// pattern; results below the normal range become signed zero and results
// above it become infinity, as in the design. The quaternion and dual
// quaternion products are written out in real arithmetic straight from their
// definitions (Hamilton product; dual part Pr*Qd + Pd*Qr) so the testbenches
// have a reference that shares nothing with the hardware's factorisation.
package tb_fp_pkg;

  function automatic real sp2real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00)      d = {f[31], 63'd0};
    else if (f[30:23] == 8'hff) d = {f[31], 11'h7ff, f[22:0], 29'd0};
    else                        d = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real2sp(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'h7ff) return {d[63], 8'hff, d[51:29] | {22'd0, |d[51:0]}};
    if (d[62:52] == 11'h000) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  typedef real rquat_t [4];
  typedef real rdquat_t [8];

  // Hamilton product a*b, quaternions as (w, x, y, z)
  function automatic rquat_t qmul(input rquat_t a, input rquat_t b);
    rquat_t c;
    c[0] = a[0]*b[0] - a[1]*b[1] - a[2]*b[2] - a[3]*b[3];
    c[1] = a[0]*b[1] + a[1]*b[0] + a[2]*b[3] - a[3]*b[2];
    c[2] = a[0]*b[2] - a[1]*b[3] + a[2]*b[0] + a[3]*b[1];
    c[3] = a[0]*b[3] + a[1]*b[2] - a[2]*b[1] + a[3]*b[0];
    return c;
  endfunction

  // dual quaternion product, elements (1, i, j, k, eps i, eps j, eps k, eps)
  function automatic rdquat_t dqmul(input rdquat_t p, input rdquat_t q);
    rquat_t pr, pd, qr, qd, tr, t1, t2;
    rdquat_t t;
    pr = '{p[0], p[1], p[2], p[3]};
    pd = '{p[7], p[4], p[5], p[6]};
    qr = '{q[0], q[1], q[2], q[3]};
    qd = '{q[7], q[4], q[5], q[6]};
    tr = qmul(pr, qr);
    t1 = qmul(pr, qd);
    t2 = qmul(pd, qr);
    t  = '{tr[0], tr[1], tr[2], tr[3],
           t1[1] + t2[1], t1[2] + t2[2], t1[3] + t2[3], t1[0] + t2[0]};
    return t;
  endfunction

  function automatic real fabs(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  // |got - exp| within tol relative to scale (the sum of the term magnitudes)
  function automatic bit close(input logic [31:0] got, input real exp, input real scale,
                               input real tol);
    return fabs(sp2real(got) - exp) <= tol * scale + 1.0e-30;
  endfunction

endpackage
