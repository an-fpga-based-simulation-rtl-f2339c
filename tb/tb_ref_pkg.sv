// tb_ref_pkg: reference model of the neuron state arithmetic for the testbenches,
// written directly from the equations with 64-bit integers:
//   dW = floor(-gamma*W / 256) + (X_K==0 && X_L ? floor(mu*(a - theta/2) / 256) : 0)
//   modified-midpoint step on the weights and on a (a' = i_K + sum of sending W),
// each result saturated (weights) or wrapped (potential) as the hardware formats do.
package tb_ref_pkg;
  typedef struct {
    longint a, ik, theta, flags;
    longint w[];
    longint g[];
    longint mu[];
  } kvec_t;

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint wrap32(longint v);
    return longint'(int'(v));
  endfunction

  function automatic longint deriv(longint w, longint g, longint mu, longint a,
                                   longint theta, bit xl, bit xk);
    longint tg, tm;
    tg = sat16((-(g * w)) >>> 8);
    tm = (!xk && xl) ? sat16((mu * wrap32(a - (theta >>> 1))) >>> 8) : 0;
    return sat16(tg + tm);
  endfunction

  // kind: 0 first, 1 middle, 2 last
  function automatic kvec_t step(int kind, kvec_t cur, kvec_t prv, bit xl[], longint h);
    kvec_t r;
    longint hh, acc, inc, dw, s;
    int n = cur.w.size();
    r = cur;
    r.w = new[n];
    hh = (kind == 1) ? 2 * h : h;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      dw = deriv(cur.w[i], cur.g[i], cur.mu[i], cur.a, cur.theta, xl[i], cur.flags & 1);
      inc = (hh * dw) >>> 12;
      if (kind == 0)      s = cur.w[i] + inc;
      else if (kind == 1) s = prv.w[i] + inc;
      else                s = (cur.w[i] + prv.w[i] + inc) >>> 1;
      r.w[i] = sat16(s);
      if (xl[i]) acc += cur.w[i];
    end
    inc = (hh * wrap32(cur.ik + acc)) >>> 12;
    if (kind == 0)      r.a = wrap32(cur.a + inc);
    else if (kind == 1) r.a = wrap32(prv.a + inc);
    else                r.a = wrap32((cur.a + prv.a + inc) >>> 1);
    return r;
  endfunction

  function automatic kvec_t mmid(kvec_t k0, bit xl[], int nsub, longint hbig);
    kvec_t km1, km, kn;
    longint h = hbig / nsub;
    km1 = k0;
    km  = step(0, k0, k0, xl, h);
    for (int m = 1; m < nsub; m++) begin
      kn  = step(1, km, km1, xl, h);
      km1 = km;
      km  = kn;
    end
    return step(2, km, km1, xl, h);
  endfunction
endpackage
