// vmac_ref_pkg: real-number reference model for the VMAC testbenches.
//
// Posit and IEEE-754 values are converted to and from `real` with algorithms
// written independently of the RTL: posits are decoded bit by bit and encoded
// by a binary search over the (monotonic) posit bit patterns, the rounding
// midpoint between two neighbours being the value of the (n+1)-bit posit that
// lies between them (ties to the even pattern). IEEE values are rounded to
// nearest even by dividing by the quantum of the target binade.
// Test operands are chosen so that every exact result fits in a double.
package vmac_ref_pkg;

  function automatic real pow2(int k);
    real r;
    r = 1.0;
    if (k >= 0) for (int i = 0; i < k; i++) r = r * 2.0;
    else        for (int i = 0; i < -k; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // floor(log2(x)) for x > 0
  function automatic int ilog2(real x);
    int k;
    k = 0;
    while (x >= 2.0) begin x = x / 2.0; k++; end
    while (x < 1.0)  begin x = x * 2.0; k--; end
    return k;
  endfunction

  // ---------------- posits ----------------
  function automatic bit p_is_nar(longint unsigned b, int n);
    return b == (64'd1 << (n - 1));
  endfunction

  function automatic real p2r(longint unsigned b, int n, int es);
    bit neg, r0;
    int i, m, k, e, fb;
    longint unsigned fr;
    real v;
    b = b & ((64'd1 << n) - 1);
    if (b == 0 || p_is_nar(b, n)) return 0.0;
    neg = b[n-1];
    if (neg) b = ((64'd1 << n) - b) & ((64'd1 << n) - 1);
    i = n - 2;
    r0 = b[i];
    m = 0;
    while (i >= 0 && b[i] == r0) begin m++; i--; end
    i--;  // skip terminating bit
    k = r0 ? m - 1 : -m;
    e = 0;
    for (int j = 0; j < es; j++) begin
      e = e * 2;
      if (i >= 0) begin e += int'(b[i]); i--; end
    end
    fb = (i >= 0) ? i + 1 : 0;
    fr = (fb > 0) ? (b & ((64'd1 << fb) - 1)) : 0;
    v = pow2(k * (1 << es) + e) * (1.0 + real'(fr) / pow2(fb));
    return neg ? -v : v;
  endfunction

  function automatic longint unsigned r2p(real x, int n, int es);
    longint unsigned lo, hi, mid, p, maxp;
    real ax, midv;
    if (x == 0.0) return 0;
    ax = rabs(x);
    maxp = (64'd1 << (n - 1)) - 1;
    if (ax >= p2r(maxp, n, es)) p = maxp;
    else if (ax <= p2r(1, n, es)) p = 1;
    else begin
      lo = 1; hi = maxp;  // p2r(lo) <= ax < p2r(hi)
      while (hi - lo > 1) begin
        mid = (lo + hi) / 2;
        if (p2r(mid, n, es) <= ax) lo = mid; else hi = mid;
      end
      if (p2r(lo, n, es) == ax) p = lo;
      else begin
        midv = p2r(2 * lo + 1, n + 1, es);
        if (ax < midv) p = lo;
        else if (ax > midv) p = hi;
        else p = lo[0] ? hi : lo;
      end
    end
    return (x < 0.0) ? (((64'd1 << n) - p) & ((64'd1 << n) - 1)) : p;
  endfunction

  // ---------------- IEEE-754 (FP32, FP16, 1-4-3 FP8) ----------------
  function automatic int fe(int n); return (n == 32) ? 8 : (n == 16) ? 5 : 4; endfunction
  function automatic int fm(int n); return (n == 32) ? 23 : (n == 16) ? 10 : 3; endfunction
  function automatic int fb(int n); return (1 << (fe(n) - 1)) - 1; endfunction

  function automatic bit f_is_nan(longint unsigned b, int n);
    longint unsigned ex, mn;
    ex = (b >> fm(n)) & ((64'd1 << fe(n)) - 1);
    mn = b & ((64'd1 << fm(n)) - 1);
    return (ex == (64'd1 << fe(n)) - 1) && (mn != 0);
  endfunction

  function automatic bit f_is_inf(longint unsigned b, int n);
    longint unsigned ex, mn;
    ex = (b >> fm(n)) & ((64'd1 << fe(n)) - 1);
    mn = b & ((64'd1 << fm(n)) - 1);
    return (ex == (64'd1 << fe(n)) - 1) && (mn == 0);
  endfunction

  function automatic real f2r(longint unsigned b, int n);
    longint unsigned ex, mn;
    real v;
    ex = (b >> fm(n)) & ((64'd1 << fe(n)) - 1);
    mn = b & ((64'd1 << fm(n)) - 1);
    if (ex == 0) v = real'(mn) * pow2(1 - fb(n) - fm(n));
    else         v = (1.0 + real'(mn) / pow2(fm(n))) * pow2(int'(ex) - fb(n));
    return b[n-1] ? -v : v;
  endfunction

  typedef struct {
    longint unsigned bits;
    bit of, uf, nx;
  } fres_t;

  // Round x to the n-bit format (nearest even); neg_zero gives the sign of
  // an exact zero.
  function automatic fres_t r2f(real x, int n, bit neg_zero);
    fres_t r;
    real ax, q, m, fl, v, qu, vu;
    int  e, emin, emax;
    longint unsigned sgn, ex, mn;
    emin = 1 - fb(n);
    emax = fb(n);
    r.of = 0; r.uf = 0; r.nx = 0;
    sgn = (x < 0.0 || (x == 0.0 && neg_zero)) ? 64'd1 << (n - 1) : 0;
    if (x == 0.0) begin r.bits = sgn; return r; end
    ax = rabs(x);
    e = ilog2(ax);
    q = (e < emin) ? pow2(emin - fm(n)) : pow2(e - fm(n));
    m = ax / q;
    fl = real'(longint'(m));
    if (fl > m) fl = fl - 1.0;
    if ((m - fl) > 0.5 || ((m - fl) == 0.5 && (longint'(fl) % 2 == 1))) fl = fl + 1.0;
    v = fl * q;
    r.nx = (v != ax);
    // tininess after rounding with unbounded exponent
    qu = pow2(e - fm(n));
    m = ax / qu;
    vu = real'(longint'(m));
    if (vu > m) vu = vu - 1.0;
    if ((m - vu) > 0.5 || ((m - vu) == 0.5 && (longint'(vu) % 2 == 1))) vu = vu + 1.0;
    vu = vu * qu;
    r.uf = r.nx && (vu < pow2(emin));
    if (v >= pow2(emax + 1)) begin
      r.of = 1; r.nx = 1;
      r.bits = sgn | (((64'd1 << fe(n)) - 1) << fm(n));
      return r;
    end
    if (v < pow2(emin)) begin
      ex = 0;
      mn = longint'(v / pow2(emin - fm(n)));
    end else begin
      e  = ilog2(v);
      ex = longint'(e + fb(n));
      mn = longint'(v / pow2(e - fm(n))) - (64'd1 << fm(n));
    end
    r.bits = sgn | (ex << fm(n)) | mn;
    return r;
  endfunction

  function automatic longint unsigned f_qnan(int n);
    return (((64'd1 << fe(n)) - 1) << fm(n)) | (64'd1 << (fm(n) - 1));
  endfunction

endpackage
