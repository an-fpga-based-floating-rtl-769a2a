// jacobi_pkg: types, constants and IEEE-754 binary64 arithmetic shared by the
// Jacobi solver.
//
// The three functions below give the value computed by the floating-point
// multiply, add and divide cores. Each rounds to nearest, ties to even, as
// IEEE-754 requires by default. To keep the cores small, subnormal numbers are
// not supported: a subnormal operand is read as a zero of the same sign, and a
// result that would be subnormal is flushed to a signed zero. NaN operands give
// the canonical quiet NaN; infinities and zeros follow IEEE-754. The number
// format follows the solver's specification (IEEE 64-bit floating point); the
// handling of subnormals is this design's own choice. The pipelined modules
// fp_mul, fp_add and fp_div wrap these functions.
package jacobi_pkg;

  typedef logic [63:0] fp64_t;

  localparam fp64_t FP_ZERO = 64'h0000_0000_0000_0000;
  localparam fp64_t FP_ONE  = 64'h3FF0_0000_0000_0000;
  localparam fp64_t FP_QNAN = 64'h7FF8_0000_0000_0000;

  // Round a normalised 53-bit significand (hidden bit at bit 52) with guard
  // bit g and sticky bit s, then pack it with sign and biased exponent e.
  // Exponents outside 1..2046 give a signed zero or infinity.
  function automatic fp64_t fp_round_pack(input logic sgn, input logic signed [13:0] e,
                                          input logic [52:0] mant, input logic g,
                                          input logic s);
    logic [53:0] r;
    logic signed [13:0] ee;
    ee = e;
    r  = {1'b0, mant};
    if (g && (s || mant[0])) r = r + 54'd1;
    if (r[53]) begin
      r  = r >> 1;
      ee = ee + 14'sd1;
    end
    if (ee >= 14'sd2047) return {sgn, 11'h7FF, 52'd0};
    if (ee <= 14'sd0)    return {sgn, 63'd0};
    return {sgn, ee[10:0], r[51:0]};
  endfunction

  function automatic logic fp_is_nan(input fp64_t a);
    return (a[62:52] == 11'h7FF) && (a[51:0] != 52'd0);
  endfunction

  function automatic logic fp_is_inf(input fp64_t a);
    return (a[62:52] == 11'h7FF) && (a[51:0] == 52'd0);
  endfunction

  // Zero or subnormal (read as zero).
  function automatic logic fp_is_zero(input fp64_t a);
    return a[62:52] == 11'h000;
  endfunction

  // a * b
  function automatic fp64_t fp_mul_f(input fp64_t a, input fp64_t b);
    logic sgn;
    logic [105:0] p;
    logic signed [13:0] e;
    sgn = a[63] ^ b[63];
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if ((fp_is_inf(a) && fp_is_zero(b)) || (fp_is_zero(a) && fp_is_inf(b))) return FP_QNAN;
    if (fp_is_inf(a) || fp_is_inf(b)) return {sgn, 11'h7FF, 52'd0};
    if (fp_is_zero(a) || fp_is_zero(b)) return {sgn, 63'd0};
    p = {53'd0, 1'b1, a[51:0]} * {53'd0, 1'b1, b[51:0]};
    e = $signed({3'b000, a[62:52]}) + $signed({3'b000, b[62:52]}) - 14'sd1023;
    if (p[105])
      return fp_round_pack(sgn, e + 14'sd1, p[105:53], p[52], |p[51:0]);
    return fp_round_pack(sgn, e, p[104:52], p[51], |p[50:0]);
  endfunction

  // a + b
  function automatic fp64_t fp_add_f(input fp64_t a, input fp64_t b);
    fp64_t oph, opl;
    logic [55:0] mb, ms, ms_sh, m;
    logic [56:0] s;
    logic [10:0] d;
    logic sticky;
    logic signed [13:0] e;
    int unsigned lz;
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if (fp_is_inf(a) && fp_is_inf(b) && (a[63] != b[63])) return FP_QNAN;
    if (fp_is_inf(a)) return a;
    if (fp_is_inf(b)) return b;
    if (fp_is_zero(a) && fp_is_zero(b)) return {a[63] & b[63], 63'd0};
    if (fp_is_zero(a)) return b;
    if (fp_is_zero(b)) return a;
    // order the operands by magnitude
    if (b[62:0] > a[62:0]) begin
      oph = b; opl = a;
    end else begin
      oph = a; opl = b;
    end
    // significands with hidden bit and three guard/round/sticky bits
    mb = {1'b1, oph[51:0], 3'b000};
    ms = {1'b1, opl[51:0], 3'b000};
    d  = oph[62:52] - opl[62:52];
    if (d >= 11'd56) begin
      ms_sh = 56'd1;
    end else begin
      sticky = |(ms & ~({56{1'b1}} << d));
      ms_sh  = (ms >> d) | {55'd0, sticky};
    end
    e = $signed({3'b000, oph[62:52]});
    if (oph[63] == opl[63]) begin
      s = {1'b0, mb} + {1'b0, ms_sh};
      if (s[56]) begin
        m = s[56:1] | {55'd0, s[0]};
        e = e + 14'sd1;
      end else begin
        m = s[55:0];
      end
    end else begin
      m = mb - ms_sh;
      if (m == 56'd0) return FP_ZERO;
      // leading-zero count: the highest set bit wins
      lz = 0;
      for (int i = 0; i < 56; i++)
        if (m[i]) lz = 55 - i;
      m = m << lz;
      e = e - 14'(lz);
    end
    return fp_round_pack(oph[63], e, m[55:3], m[2], m[1] | m[0]);
  endfunction

  // a / b
  function automatic fp64_t fp_div_f(input fp64_t a, input fp64_t b);
    logic sgn;
    logic [108:0] num, q, rem;
    logic signed [13:0] e;
    sgn = a[63] ^ b[63];
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if ((fp_is_inf(a) && fp_is_inf(b)) || (fp_is_zero(a) && fp_is_zero(b))) return FP_QNAN;
    if (fp_is_inf(a) || fp_is_zero(b)) return {sgn, 11'h7FF, 52'd0};
    if (fp_is_zero(a) || fp_is_inf(b)) return {sgn, 63'd0};
    num = {1'b1, a[51:0], 56'd0};
    q   = num / {56'd0, 1'b1, b[51:0]};
    rem = num % {56'd0, 1'b1, b[51:0]};
    e   = $signed({3'b000, a[62:52]}) - $signed({3'b000, b[62:52]}) + 14'sd1023;
    if (q[56])
      return fp_round_pack(sgn, e, q[56:4], q[3], (|q[2:0]) || (rem != 109'd0));
    return fp_round_pack(sgn, e - 14'sd1, q[55:3], q[2], (|q[1:0]) || (rem != 109'd0));
  endfunction

  // Latency of the serial reduction circuit for reduction vectors of m
  // values, alpha_r = m + 2^(ceil(lg m)+1) + (alpha_a - 1) ceil(lg m) - 2.
  function automatic int unsigned reduce_latency(input int unsigned m, input int unsigned alpha_a);
    int unsigned l;
    l = (m > 1) ? $clog2(m) : 0;
    return m + (2 ** (l + 1)) + (alpha_a - 1) * l - 2;
  endfunction

endpackage
