// tb_ref_pkg: reference arithmetic for the decoder testbenches, written
// directly from the algorithm (integers, q:2 units) and independent of the
// RTL structure.
//   gref   : g(x) = log(1+exp(-x)) approximated on the real axis:
//            0.75 at 0, 0.5 up to 0.75, 0.25 up to 2, 0 beyond
//   fref   : LDPC check function f(a,b) = sign(a)sign(b) *
//            (min(|a|,|b|) + g(|a|+|b|) - g(||a|-|b||)), never below zero
//   mstar  : max*(a,b) = max(a,b) + g(|a-b|), modulo 2^10 like the metrics
//   trellis: 8-state LTE constituent encoder as a shift register
package tb_ref_pkg;

  function automatic int gref(int m);
    real x;
    x = real'(m < 0 ? -m : m) * 0.25;
    if (x == 0.0)       return 3;
    else if (x <= 0.75) return 2;
    else if (x <= 2.0)  return 1;
    else                return 0;
  endfunction

  function automatic int absi(int a);
    return a < 0 ? -a : a;
  endfunction

  function automatic int fref(int a, int b);
    int m, r;
    m = (absi(a) < absi(b)) ? absi(a) : absi(b);
    r = m + gref(absi(a) + absi(b)) - gref(absi(a) - absi(b));
    if (r < 0) r = 0;
    return ((a < 0) != (b < 0)) ? -r : r;
  endfunction

  // wrap to a signed 10-bit value
  function automatic int w10(int a);
    int r;
    r = a & 1023;
    return (r >= 512) ? r - 1024 : r;
  endfunction

  function automatic int mstar(int a, int b);
    int d;
    d = w10(a - b);
    return w10(((d < 0) ? b : a) + gref(d));
  endfunction

  // encoder: registers r1 (newest), r2, r3; state index r1*4 + r2*2 + r3
  function automatic int enc_next(int s, int u);
    int r1, r2, r3, fb;
    r1 = (s >> 2) & 1; r2 = (s >> 1) & 1; r3 = s & 1;
    fb = u ^ r2 ^ r3;
    return fb * 4 + r1 * 2 + r2;
  endfunction

  function automatic int enc_par(int s, int u);
    int r1, r2, r3, fb;
    r1 = (s >> 2) & 1; r2 = (s >> 1) & 1; r3 = s & 1;
    fb = u ^ r2 ^ r3;
    return fb ^ r1 ^ r3;
  endfunction

  // branch metric (1-u)(ys+La) + (1-p)yp
  function automatic int bm(int ys, int yp, int la, int u, int p);
    return (u ? 0 : ys + la) + (p ? 0 : yp);
  endfunction

  typedef int vec8_t [8];

  function automatic vec8_t fwd_step(vec8_t a, int ys, int yp, int la);
    vec8_t n;
    bit    seen [8];
    for (int s = 0; s < 8; s++) seen[s] = 0;
    for (int s = 0; s < 8; s++)
      for (int u = 0; u < 2; u++) begin
        int t, m;
        t = enc_next(s, u);
        m = w10(a[s] + bm(ys, yp, la, u, enc_par(s, u)));
        if (!seen[t]) begin n[t] = m; seen[t] = 1; end
        else n[t] = mstar(n[t], m);
      end
    return n;
  endfunction

  function automatic vec8_t bwd_step(vec8_t b, int ys, int yp, int la);
    vec8_t n;
    for (int s = 0; s < 8; s++)
      n[s] = mstar(w10(b[enc_next(s, 0)] + bm(ys, yp, la, 0, enc_par(s, 0))),
                   w10(b[enc_next(s, 1)] + bm(ys, yp, la, 1, enc_par(s, 1))));
    return n;
  endfunction

  // APP LLR log P(0)/P(1): per bit value, max* over branches leaving states
  // (0,1), (2,3), then the two pairs
  function automatic int app_llr(vec8_t a, vec8_t b, int ys, int yp, int la);
    int m [2];
    for (int u = 0; u < 2; u++) begin
      int q [4];
      for (int k = 0; k < 4; k++)
        q[k] = mstar(w10(a[2*k]   + b[enc_next(2*k, u)]   + bm(ys, yp, la, u, enc_par(2*k, u))),
                     w10(a[2*k+1] + b[enc_next(2*k+1, u)] + bm(ys, yp, la, u, enc_par(2*k+1, u))));
      m[u] = mstar(mstar(q[0], q[1]), mstar(q[2], q[3]));
    end
    return w10(m[0] - m[1]);
  endfunction

endpackage
