// ffp_ref_pkg: bit-exact software reference of the fraction arithmetic, for
// the testbenches. Written as plain integer arithmetic on 64-bit values,
// independently of the RTL structure: framing is "halve numerator and
// denominator until both are below 2^16, saturate to 65535/1 if the
// denominator reaches zero"; a product multiplies numerators and
// denominators; a sum forms the two cross products and subtracts the smaller
// magnitude from the larger when the signs differ. The sigmoid follows the
// same operation order as the hardware: e = (a|v| + b)|v| + c on the segment
// of |v|, then D/(D+N) for v >= 0 and N/(D+N) for v < 0.
package ffp_ref_pkg;
  import ffp_pkg::*;

  function automatic frac_t mkf(int unsigned n, int unsigned d, bit s);
    frac_t f;
    f.num  = 16'(n);
    f.den  = 16'(d);
    f.sign = s;
    return f;
  endfunction

  function automatic real f2r(frac_t f);
    real r;
    r = real'(f.num) / real'(f.den);
    return f.sign ? -r : r;
  endfunction

  function automatic int ref_shifts(longint unsigned n, longint unsigned d);
    int k = 0;
    while (n >= 64'd65536 || d >= 64'd65536) begin
      n = n >> 1;
      d = d >> 1;
      k++;
      if (d == 0) break;
    end
    return k;
  endfunction

  function automatic frac_t ref_frame(longint unsigned n, longint unsigned d, bit s);
    while (n >= 64'd65536 || d >= 64'd65536) begin
      n = n >> 1;
      d = d >> 1;
      if (d == 0) begin
        n = 65535;
        d = 1;
      end
    end
    return mkf(int'(n), int'(d), s);
  endfunction

  function automatic frac_t ref_mul(frac_t a, frac_t b);
    return ref_frame(longint'(a.num) * longint'(b.num),
                     longint'(a.den) * longint'(b.den), a.sign ^ b.sign);
  endfunction

  function automatic frac_t ref_add(frac_t a, frac_t b);
    longint unsigned t1, t2, d, n;
    bit s;
    t1 = longint'(a.num) * longint'(b.den);
    t2 = longint'(b.num) * longint'(a.den);
    d  = longint'(a.den) * longint'(b.den);
    if (a.sign == b.sign) begin
      n = t1 + t2; s = a.sign;
    end else if (t1 == t2) begin
      n = 0; s = 0;
    end else if (t1 > t2) begin
      n = t1 - t2; s = a.sign;
    end else begin
      n = t2 - t1; s = b.sign;
    end
    return ref_frame(n, d, s);
  endfunction

  function automatic int ref_seg(frac_t v);
    for (int s = 1; s <= 3; s++)
      if ((int'(v.num) >> s) < int'(v.den)) return s - 1;
    return 3;
  endfunction

  // Coefficients of the quadratic fits of exp(-v), as fractions:
  // index 3*s + k, k = 0 (v^2), 1 (v), 2 (constant).
  function automatic frac_t sig_coef(int i);
    case (i)
      0: return mkf(12858, 64703, 0);
      1: return mkf(11691, 14482, 1);
      2: return mkf(56072, 57521, 0);
      3: return mkf(1046, 38893, 0);
      4: return mkf(13883, 64027, 1);
      5: return mkf(12560, 27423, 0);
      6: return mkf(63, 38032, 0);
      7: return mkf(581, 24655, 1);
      8: return mkf(456, 5425, 0);
      default: return FRAC_ZERO;
    endcase
  endfunction

  function automatic frac_t ref_sigmoid(frac_t v);
    frac_t vabs, a, b, c, acc;
    int    sg;
    int unsigned en, sum, x;
    sg   = ref_seg(v);
    a    = (sg < 3) ? sig_coef(3*sg)     : FRAC_ZERO;
    b    = (sg < 3) ? sig_coef(3*sg + 1) : FRAC_ZERO;
    c    = (sg < 3) ? sig_coef(3*sg + 2) : FRAC_ZERO;
    vabs = mkf(v.num, v.den, 0);
    acc  = ref_add(b, ref_mul(vabs, a));
    acc  = ref_add(c, ref_mul(vabs, acc));
    en   = acc.sign ? 0 : acc.num;
    sum  = en + acc.den;
    x    = v.sign ? en : acc.den;
    return ref_frame(x, sum, 0);
  endfunction

  // Weighted sum of one neuron, accumulated in input order, bias last.
  function automatic frac_t ref_neuron(frac_t xs[$], frac_t ws[$]);
    frac_t acc = FRAC_ZERO;
    foreach (xs[i]) acc = ref_add(acc, ref_mul(xs[i], ws[i]));
    return acc;
  endfunction

  // A random fraction with numerator below nmax and denominator in 1..dmax.
  function automatic frac_t rand_frac(int unsigned nmax, int unsigned dmax);
    return mkf($urandom_range(nmax - 1, 0), $urandom_range(dmax, 1), 1'($urandom_range(1, 0)));
  endfunction

  // Word address of weight (layer l, row j, neuron m) in the weight memory of
  // a design with imax inputs and nmax neurons; row n_in of a layer is its
  // bias row (n_in = imax for layer 0, nmax for the others).
  function automatic int waddr(int imax, int nmax, int l, int j, int m);
    if (l == 0) return j * nmax + m;
    return (imax + 1) * nmax + (l - 1) * (nmax + 1) * nmax + j * nmax + m;
  endfunction

  // Forward pass of a whole network. w is the weight memory image, laid out
  // as above; bias terms are accumulated after the inputs.
  function automatic void ref_network(int imax, int nmax, int n_in0, int nl,
                                      int ln[$], bit lb[$], frac_t x[$], frac_t w[$],
                                      output frac_t out[$]);
    frac_t cur[$];
    cur = x;
    for (int l = 0; l < nl; l++) begin
      frac_t nxt[$];
      int rows, n_in;
      n_in = (l == 0) ? n_in0 : ln[l-1];
      rows = (l == 0) ? imax : nmax;
      for (int m = 0; m < ln[l]; m++) begin
        frac_t acc;
        acc = FRAC_ZERO;
        for (int j = 0; j < n_in; j++)
          acc = ref_add(acc, ref_mul(cur[j], w[waddr(imax, nmax, l, j, m)]));
        if (lb[l]) acc = ref_add(acc, ref_mul(FRAC_ONE, w[waddr(imax, nmax, l, rows, m)]));
        nxt.push_back(ref_sigmoid(acc));
      end
      cur = nxt;
    end
    out = cur;
  endfunction

endpackage
