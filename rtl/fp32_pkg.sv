// fp32_pkg: single-precision (IEEE 754 binary32) arithmetic used by the Adam
// functional units and by the kernel's bias-correction sequencer.
//
// Each operation is a combinational function: multiply, add/subtract, divide
// and square root, all with round-to-nearest-even. To keep the datapath small,
// subnormal inputs are read as zero and results that would be subnormal are
// flushed to a signed zero (flush-to-zero, as FPGA floating-point cores commonly
// do). Infinities are produced on overflow, and every invalid operation
// (NaN input, 0*inf, inf-inf, 0/0, inf/inf, sqrt of a negative number) returns
// the canonical quiet NaN 0x7FC00000.
//
// The Adam kernel computes in FP32 as its description requires; the rounding
// mode and the flush-to-zero behaviour are this design's own choice.
package fp32_pkg;

  localparam logic [31:0] FP_ONE  = 32'h3F80_0000;
  localparam logic [31:0] FP_QNAN = 32'h7FC0_0000;

  function automatic logic is_nan(input logic [31:0] a);
    return (a[30:23] == 8'hFF) && (a[22:0] != '0);
  endfunction

  function automatic logic is_inf(input logic [31:0] a);
    return (a[30:23] == 8'hFF) && (a[22:0] == '0);
  endfunction

  function automatic logic is_zero(input logic [31:0] a);
    return a[30:23] == 8'h00;  // subnormals count as zero
  endfunction

  // Round a normalised significand (hidden bit at sig[23]) to nearest even
  // using one guard bit and a sticky bit, then pack with biased exponent e.
  function automatic logic [31:0] round_pack(input logic sign, input int e,
                                             input logic [23:0] sig,
                                             input logic guard, input logic sticky);
    logic [24:0] r;
    int          ee;
    r  = {1'b0, sig};
    ee = e;
    if (guard && (sticky || sig[0])) r = r + 25'd1;
    if (r[24]) begin
      r  = r >> 1;
      ee = ee + 1;
    end
    if (ee >= 255) return {sign, 8'hFF, 23'd0};
    if (ee <= 0)   return {sign, 31'd0};
    return {sign, ee[7:0], r[22:0]};
  endfunction

  function automatic logic [31:0] fp_mul(input logic [31:0] a, input logic [31:0] b);
    logic        s;
    logic [47:0] p;
    int          e;
    s = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b)))
      return FP_QNAN;
    if (is_inf(a) || is_inf(b)) return {s, 8'hFF, 23'd0};
    if (is_zero(a) || is_zero(b)) return {s, 31'd0};
    p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    e = int'(a[30:23]) + int'(b[30:23]) - 127;
    if (p[47]) return round_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
    else       return round_pack(s, e,     p[46:23], p[22], |p[21:0]);
  endfunction

  function automatic logic [31:0] fp_add(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] x, y;
    logic [49:0] mx, my, sh;
    logic [50:0] r;
    int          d, lead, e;
    logic [50:0] n;
    if (is_nan(a) || is_nan(b)) return FP_QNAN;
    if (is_inf(a) && is_inf(b)) return (a[31] == b[31]) ? a : FP_QNAN;
    if (is_inf(a)) return a;
    if (is_inf(b)) return b;
    if (is_zero(a) && is_zero(b)) return {a[31] & b[31], 31'd0};
    if (is_zero(a)) return b;
    if (is_zero(b)) return a;
    // x is the operand of larger magnitude
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    d  = int'(x[30:23]) - int'(y[30:23]);
    mx = {1'b1, x[22:0], 26'd0};
    my = {1'b1, y[22:0], 26'd0};
    if (d >= 50) sh = 50'd1;  // only the sticky bit survives
    else begin
      sh = my >> d;
      if ((my & ((50'd1 << d) - 50'd1)) != '0) sh[0] = 1'b1;
    end
    if (x[31] == y[31]) r = {1'b0, mx} + {1'b0, sh};
    else                r = {1'b0, mx} - {1'b0, sh};
    if (r == '0) return 32'd0;
    lead = 0;
    for (int i = 0; i <= 50; i++) if (r[i]) lead = i;
    n = r << (50 - lead);
    e = int'(x[30:23]) + lead - 49;
    return round_pack(x[31], e, n[50:27], n[26], |n[25:0]);
  endfunction

  function automatic logic [31:0] fp_sub(input logic [31:0] a, input logic [31:0] b);
    return fp_add(a, {~b[31], b[30:0]});
  endfunction

  function automatic logic [31:0] fp_div(input logic [31:0] a, input logic [31:0] b);
    logic        s;
    logic [49:0] num, q, rem;
    int          e;
    s = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b) || (is_zero(a) && is_zero(b)) || (is_inf(a) && is_inf(b)))
      return FP_QNAN;
    if (is_inf(a) || is_zero(b)) return {s, 8'hFF, 23'd0};
    if (is_zero(a) || is_inf(b)) return {s, 31'd0};
    num = {26'd0, 1'b1, a[22:0]} << 26;
    q   = num / {26'd0, 1'b1, b[22:0]};
    rem = num % {26'd0, 1'b1, b[22:0]};
    e   = int'(a[30:23]) - int'(b[30:23]) + 127;
    if (q[26]) return round_pack(s, e,     q[26:3], q[2], (|q[1:0]) || (rem != '0));
    else       return round_pack(s, e - 1, q[25:2], q[1], q[0] || (rem != '0));
  endfunction

  // Integer square root by the restoring digit-by-digit method.
  function automatic logic [24:0] isqrt50(input logic [49:0] x, output logic exact);
    logic [49:0] rem, root, trial;
    rem  = x;
    root = '0;
    for (int i = 24; i >= 0; i--) begin
      trial = root + (50'd1 << (2 * i));
      if (rem >= trial) begin
        rem  = rem - trial;
        root = (root >> 1) + (50'd1 << (2 * i));
      end else begin
        root = root >> 1;
      end
    end
    exact = (rem == '0);
    return root[24:0];
  endfunction

  function automatic logic [31:0] fp_sqrt(input logic [31:0] a);
    logic [49:0] x;
    logic [24:0] r;
    logic        exact;
    int          eu;
    if (is_nan(a)) return FP_QNAN;
    if (is_zero(a)) return {a[31], 31'd0};
    if (a[31]) return FP_QNAN;
    if (is_inf(a)) return a;
    eu = int'(a[30:23]) - 127;
    x  = {26'd0, 1'b1, a[22:0]} << 25;
    if (eu % 2 != 0) begin
      x  = x << 1;
      eu = eu - 1;
    end
    r = isqrt50(x, exact);
    return round_pack(1'b0, eu / 2 + 127, r[24:1], r[0], !exact);
  endfunction

endpackage
