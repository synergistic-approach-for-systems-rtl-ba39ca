// adam_ref_pkg: reference arithmetic for the Adam testbenches.
//
// Every FP32 operation is evaluated in double precision on values that are
// exactly representable in FP32 and then rounded once to FP32. For products
// this is exact before the rounding; for sums, quotients and square roots the
// double-then-single rounding is known to equal a single correct rounding, so
// the results are the IEEE round-to-nearest-even values the hardware must
// produce. The stimulus keeps every value in the normal range so that the
// hardware's flush-to-zero of subnormals never matters.
package adam_ref_pkg;
  import axdimm_pkg::*;

  // FP32 -> double, exact (normal numbers and zero only)
  function automatic real f2r(input logic [31:0] a);
    logic [10:0] e;
    if (a[30:23] == 8'd0) return 0.0;
    e = 11'(int'(a[30:23]) - 127 + 1023);
    return $bitstoreal({a[31], e, a[22:0], 29'd0});
  endfunction

  // double -> FP32 with round-to-nearest-even (results stay in the normal range)
  function automatic logic [31:0] r2f(input real x);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    d = $realtobits(x);
    if (d[62:0] == '0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((d[27:0] != '0) || d[29])) m = m + 25'd1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] rmul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction
  function automatic logic [31:0] radd(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] rsub(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction
  function automatic logic [31:0] rdiv(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) / f2r(b));
  endfunction
  function automatic logic [31:0] rsqrt(input logic [31:0] a);
    return r2f($sqrt(f2r(a)));
  endfunction

  localparam logic [31:0] ONE = 32'h3F80_0000;

  // Constants as the kernel derives them; beta^t by square-and-multiply over
  // the bits of t, least significant first.
  function automatic adam_const_t make_const(input logic [31:0] lr, input logic [31:0] b1,
                                             input logic [31:0] b2, input logic [31:0] lambda,
                                             input logic [31:0] eps, input int unsigned t);
    adam_const_t c;
    logic [31:0] p1, p2, q1, q2;
    int unsigned e;
    p1 = ONE; p2 = ONE; q1 = b1; q2 = b2; e = t;
    while (e != 0) begin
      if (e[0]) begin
        p1 = rmul(p1, q1);
        p2 = rmul(p2, q2);
      end
      q1 = rmul(q1, q1);
      q2 = rmul(q2, q2);
      e  = e >> 1;
    end
    c.lr = lr; c.beta1 = b1; c.beta2 = b2; c.lambda = lambda; c.eps = eps;
    c.omb1 = rsub(ONE, b1);
    c.omb2 = rsub(ONE, b2);
    c.bc1  = rsub(ONE, p1);
    c.bc2  = rsub(ONE, p2);
    return c;
  endfunction

  function automatic adam_out_t adam_step(input adam_const_t c, input adam_in_t x);
    adam_out_t   o;
    logic [31:0] g, mt, vt, mh, vh, dn;
    g    = radd(x.grad, rmul(c.lambda, x.theta));
    mt   = radd(rmul(c.beta1, x.m), rmul(c.omb1, g));
    vt   = radd(rmul(c.beta2, x.v), rmul(c.omb2, rmul(g, g)));
    mh   = rdiv(mt, c.bc1);
    vh   = rdiv(vt, c.bc2);
    dn   = radd(rsqrt(vh), c.eps);
    o.theta = rsub(x.theta, rmul(c.lr, rdiv(mh, dn)));
    o.m  = mt;
    o.v  = vt;
    return o;
  endfunction

  // Random FP32 value of magnitude in [2^lo, 2^hi), optionally signed.
  function automatic logic [31:0] rand_f(input int lo, input int hi, input bit sgn);
    logic [7:0] e;
    e = 8'(127 + lo + int'($urandom_range(hi - lo - 1, 0)));
    return {sgn ? 1'($urandom) : 1'b0, e, 23'($urandom)};
  endfunction

  function automatic adam_in_t rand_in();
    adam_in_t x;
    x.theta = rand_f(-8, 2, 1);
    x.grad  = rand_f(-12, 0, 1);
    x.m     = rand_f(-14, -2, 1);
    x.v     = rand_f(-24, -6, 0);
    return x;
  endfunction

endpackage
