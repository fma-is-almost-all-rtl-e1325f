// Reference FP16 arithmetic for the testbenches, written on SystemVerilog
// `real` (binary64) and independent of the RTL: conversion of FP16 bit
// patterns to real, and rounding of a real to the nearest-even FP16.
package fp16_ref_pkg;

  function automatic real fp16_to_real(logic [15:0] h);
    int  e;
    real m;
    e = int'(h[14:10]);
    if (e == 0) m = real'(h[9:0]) / 1024.0;
    else        m = 1.0 + real'(h[9:0]) / 1024.0;
    if (e == 0) e = 1;
    return (h[15] ? -m : m) * (2.0 ** (e - 15));
  endfunction

  function automatic logic [15:0] real_to_fp16(real v);
    logic s;
    real  a, qnt, r, f;
    int   e, field;
    logic [11:0] mi;
    s = (v < 0.0);
    a = s ? -v : v;
    if (a == 0.0) return {s, 15'h0};
    if (a >= 65520.0) return {s, 5'h1F, 10'h0};
    e = 0;
    while (2.0 ** (e + 1) <= a) e++;
    while (2.0 ** e > a) e--;
    if (e < -14) e = -14;
    qnt = 2.0 ** (e - 10);
    r = a / qnt;
    f = $floor(r);
    if ((r - f) > 0.5) f = f + 1.0;
    else if ((r - f) == 0.5 && ($rtoi(f) % 2) == 1) f = f + 1.0;
    mi = 12'($rtoi(f));
    field = e + 15;
    if (mi == 12'd2048) begin mi = 12'd1024; field++; end
    if (field >= 31) return {s, 5'h1F, 10'h0};
    if (mi < 12'd1024) return {s, 5'h0, mi[9:0]};
    return {s, 5'(field), mi[9:0]};
  endfunction

  // Random finite FP16 with a biased exponent field in [lo, hi].
  function automatic logic [15:0] rand_fp16(int lo, int hi);
    logic [15:0] h;
    h[15]    = 1'($urandom);
    h[14:10] = 5'(lo + ($urandom % (hi - lo + 1)));
    h[9:0]   = 10'($urandom);
    return h;
  endfunction


  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // One FP16 FMA of the reference: exact in binary64, then one rounding.
  function automatic logic [15:0] fma_r(logic [15:0] a, logic [15:0] b, logic [15:0] c);
    return real_to_fp16(fp16_to_real(a) * fp16_to_real(b) + fp16_to_real(c));
  endfunction

  // PWPA table: 7 breakpoints and (a, b, c, d) per partition, FP16.
  typedef struct {
    logic [15:0] bp   [7];
    logic [15:0] coef [8][4];
  } pwpa_tab_t;

  function automatic int part_of(pwpa_tab_t t, logic [15:0] x);
    int p;
    p = 0;
    for (int i = 0; i < 7; i++) if (fp16_to_real(x) >= fp16_to_real(t.bp[i])) p = i + 1;
    return p;
  endfunction

  // Degree-3 Horner evaluation with an FP16 rounding after every FMA.
  function automatic logic [15:0] pwpa_r(pwpa_tab_t t, logic [15:0] x);
    int p;
    logic [15:0] h;
    p = part_of(t, x);
    h = fma_r(t.coef[p][0], x, t.coef[p][1]);
    h = fma_r(h, x, t.coef[p][2]);
    h = fma_r(h, x, t.coef[p][3]);
    return h;
  endfunction

  // Target functions used to build coefficient tables.
  function automatic real fn(int kind, real x);
    case (kind)
      0: return $exp(x);                          // exponential
      1: return 1.0 / x;                          // reciprocal
      2: return 1.0 / $sqrt(x);                   // inverse square root
      3: return x / (1.0 + $exp(-x));             // SiLU
      default: return 0.5 * x * (1.0 + $tanh(0.7978845608 * (x + 0.044715 * x * x * x))); // GELU (tanh form)
    endcase
  endfunction

  // Cubic through 4 Chebyshev nodes of [lo, hi], as monomial coefficients
  // m[0..3] of m3 x^3 + m2 x^2 + m1 x + m0 (Lagrange basis expanded).
  function automatic void fit_cubic(int kind, real lo, real hi, output real m [4]);
    real xn [4];
    real bpoly [4];
    real den, t;
    for (int i = 0; i < 4; i++) begin
      xn[i] = 0.5 * (lo + hi) + 0.5 * (hi - lo) * $cos((2 * i + 1) * 3.14159265358979 / 8.0);
      m[i] = 0.0;
    end
    for (int i = 0; i < 4; i++) begin
      bpoly = '{1.0, 0.0, 0.0, 0.0};
      den = 1.0;
      for (int k = 0; k < 4; k++) if (k != i) begin
        // bpoly *= (x - xn[k])
        for (int d = 3; d >= 1; d--) bpoly[d] = bpoly[d-1] - xn[k] * bpoly[d];
        bpoly[0] = -xn[k] * bpoly[0];
        den = den * (xn[i] - xn[k]);
      end
      t = fn(kind, xn[i]) / den;
      for (int d = 0; d < 4; d++) m[d] += t * bpoly[d];
    end
  endfunction

  // Table for a function over 8 partitions with the given 9 edges
  // (edg[0] and edg[8] bound the fit of the outer partitions).
  function automatic pwpa_tab_t make_tab(int kind, real edg [9], bit zero_first);
    pwpa_tab_t t;
    real m [4];
    for (int i = 0; i < 7; i++) t.bp[i] = real_to_fp16(edg[i+1]);
    for (int p = 0; p < 8; p++) begin
      fit_cubic(kind, edg[p], edg[p+1], m);
      if (zero_first && p == 0) m = '{0.0, 0.0, 0.0, 0.0};
      t.coef[p][0] = real_to_fp16(m[3]);
      t.coef[p][1] = real_to_fp16(m[2]);
      t.coef[p][2] = real_to_fp16(m[1]);
      t.coef[p][3] = real_to_fp16(m[0]);
    end
    return t;
  endfunction

  function automatic pwpa_tab_t tab_exp();
    real e [9] = '{-16.0, -8.0, -5.0, -3.5, -2.5, -1.75, -1.0, -0.5, 0.0};
    return make_tab(0, e, 1'b1);
  endfunction
  function automatic pwpa_tab_t tab_recip();
    real e [9] = '{1.0, 1.125, 1.25, 1.375, 1.5, 1.625, 1.75, 1.875, 2.0};
    return make_tab(1, e, 1'b0);
  endfunction
  function automatic pwpa_tab_t tab_isqrt();
    real e [9] = '{1.0, 1.25, 1.5, 1.75, 2.0, 2.5, 3.0, 3.5, 4.0};
    return make_tab(2, e, 1'b0);
  endfunction
  function automatic pwpa_tab_t tab_act(int kind);
    real e [9] = '{-8.0, -4.0, -2.5, -1.5, -0.5, 0.5, 1.5, 3.0, 8.0};
    return make_tab(kind, e, 1'b0);
  endfunction

  // Domain reduction reference: x = 2^E * m, m in [1,2).
  function automatic int exp_of(logic [15:0] x);
    int e;
    real a;
    a = fp16_to_real(x);
    e = 0;
    while (2.0 ** (e + 1) <= a) e++;
    while (2.0 ** e > a) e--;
    return e;
  endfunction

  // Reciprocal as the engine computes it: PWPA on the mantissa, rescaled.
  function automatic logic [15:0] recip_r(pwpa_tab_t t, logic [15:0] x);
    int e;
    e = exp_of(x);
    return real_to_fp16(fp16_to_real(pwpa_r(t, real_to_fp16(fp16_to_real(x) / (2.0 ** e)))) * (2.0 ** (-e)));
  endfunction

  function automatic logic [15:0] isqrt_r(pwpa_tab_t t, logic [15:0] x);
    int e, k;
    real z;
    e = exp_of(x);
    k = (e >= 0) ? e / 2 : -((-e + 1) / 2);
    z = fp16_to_real(x) / (2.0 ** (2 * k));
    return real_to_fp16(fp16_to_real(pwpa_r(t, real_to_fp16(z))) * (2.0 ** (-k)));
  endfunction

endpackage
