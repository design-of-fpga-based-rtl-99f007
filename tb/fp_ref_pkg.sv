// fp_ref_pkg: reference arithmetic for the float32 testbenches.
//
// The expected float32 results are computed independently of the RTL: the
// operands are converted to double precision ("real"), the operation is
// done there, and the double result is rounded to float32 (round to nearest,
// ties to even, with subnormals) by f64_to_f32 below, which works on the
// bit pattern of the double. A product of two float32 numbers is exact in
// double precision, so its reference is exact. A sum is exact only when the
// exponents are close enough; sum_is_exact() tells whether it was (two-sum
// error term), and a testbench skips the rare vectors where it was not, to
// avoid double rounding in the reference.
package fp_ref_pkg;

  function automatic real f32_to_real(input logic [31:0] f);
    logic [63:0] d;
    int          e;
    real         m;
    if (f[30:23] == 8'hFF) begin
      if (f[22:0] != 0) d = 64'h7FF8_0000_0000_0000;
      else              d = {f[31], 11'h7FF, 52'd0};
      return $bitstoreal(d);
    end
    if (f[30:23] == 8'd0) begin
      // subnormal or zero: frac * 2^-149
      m = real'(f[22:0]);
      for (int i = 0; i < 149; i++) m = m / 2.0;
      return f[31] ? -m : m;
    end
    e = int'(f[30:23]) - 127 + 1023;
    d = {f[31], 11'(e), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] f64_to_f32(input real r);
    logic [63:0] d;
    logic        s;
    int          e, fe, sh;
    logic [52:0] m;
    logic [23:0] keep;
    logic        g, st, up;
    logic [31:0] res;
    d = $realtobits(r);
    s = d[63];
    e = int'(d[62:52]);
    if (e == 2047) return (d[51:0] != 0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'd0};
    if (e == 0 && d[51:0] == 0) return {s, 31'd0};
    if (e == 0) return {s, 31'd0};  // double subnormals are far below float32
    m  = {1'b1, d[51:0]};
    fe = e - 1023 + 127;
    sh = 29;                 // 53-bit significand to 24 bits
    if (fe < 1) begin
      sh = sh + (1 - fe);
      fe = 0;
    end
    if (sh > 60) return {s, 31'd0};
    keep = 24'(m >> sh);
    g    = (sh <= 53) ? m[sh-1] : 1'b0;
    st   = 1'b0;
    for (int i = 0; i < 53; i++) if (i < sh - 1 && m[i]) st = 1'b1;
    up   = g & (st | keep[0]);
    if (fe == 0) res = {s, 8'd0, keep[22:0]} + 32'(up);
    else         res = {s, 8'(fe), keep[22:0]} + 32'(up);
    if (fe >= 255 || res[30:23] == 8'hFF) res = {s, 8'hFF, 23'd0};
    return res;
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return f64_to_f32(f32_to_real(a) * f32_to_real(b));
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    real s;
    s = f32_to_real(a) + f32_to_real(b);
    if (s == 0.0) begin
      // exact zero: -0 only when both operands are negative
      return {a[31] & b[31], 31'd0};
    end
    return f64_to_f32(s);
  endfunction

  function automatic logic sum_is_exact(input logic [31:0] a, input logic [31:0] b);
    real x, y, s, bv, err;
    x   = f32_to_real(a);
    y   = f32_to_real(b);
    s   = x + y;
    bv  = s - x;
    err = (x - (s - bv)) + (y - bv);
    return err == 0.0;
  endfunction

  // Reference neuron: (w_a*x_a + w_b*x_b) + bias, each operation rounded to
  // float32. exact is cleared when one of the two sums was not exact in
  // double precision, so that the reference may be off by double rounding.
  function automatic logic [31:0] ref_neuron(input logic [31:0] x_a, input logic [31:0] x_b,
                                             input logic [31:0] w_a, input logic [31:0] w_b,
                                             input logic [31:0] bias, output logic exact);
    logic [31:0] pa, pb, sp;
    pa    = ref_mul(w_a, x_a);
    pb    = ref_mul(w_b, x_b);
    sp    = ref_add(pa, pb);
    exact = sum_is_exact(pa, pb) && sum_is_exact(sp, bias);
    return ref_add(sp, bias);
  endfunction

  function automatic logic is_nan(input logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] != 0);
  endfunction

  // Same value, or both NaN.
  function automatic logic f32_match(input logic [31:0] got, input logic [31:0] exp);
    if (is_nan(exp)) return is_nan(got);
    return got == exp;
  endfunction

  // Random float32 with an exponent in [emin, emax] (biased), random sign
  // and fraction.
  function automatic logic [31:0] rand_f32(input int emin, input int emax);
    logic [31:0] r;
    int          e;
    e = emin + int'($urandom_range(emax - emin));
    r = {$urandom()};
    return {r[31], 8'(e), r[22:0]};
  endfunction

endpackage
