// decim_model_pkg: reference arithmetic for the decimation filter testbenches.
//
// Each function computes a filter stage directly from its definition (a
// convolution with the stage's impulse response, followed by the documented
// scaling), using 64-bit integers, so the testbenches can compare the RTL
// word for word without sharing any of its structure.
package decim_model_pkg;

  typedef longint lvec_t[];

  // floor(v / 2**s)
  function automatic longint fdiv(longint v, int s);
    return v >>> s;
  endfunction

  // round half up: floor((v + 2**(s-1)) / 2**s)
  function automatic longint rdiv(longint v, int s);
    if (s <= 0) return v;
    return (v + (longint'(1) <<< (s - 1))) >>> s;
  endfunction

  function automatic longint sat(longint v, int w);
    longint mx, mn;
    mx = (longint'(1) <<< (w - 1)) - 1;
    mn = -(longint'(1) <<< (w - 1));
    if (v > mx) return mx;
    if (v < mn) return mn;
    return v;
  endfunction

  // Impulse response of an N-th order CIC: (sum_{k<RM} z^-k)^N.
  function automatic lvec_t cic_impulse(int n, int rm);
    lvec_t h, t;
    h = new[1];
    h[0] = 1;
    for (int s = 0; s < n; s++) begin
      t = new[h.size() + rm - 1];
      foreach (t[i]) t[i] = 0;
      foreach (h[i]) for (int k = 0; k < rm; k++) t[i+k] += h[i];
      h = t;
    end
    return h;
  endfunction

  // Full-rate convolution y[n] = sum h[k] x[n-k] evaluated at index n.
  function automatic longint conv_at(input lvec_t x, input lvec_t h, int n);
    longint acc;
    acc = 0;
    foreach (h[k]) if (n - k >= 0 && n - k < x.size()) acc += h[k] * x[n-k];
    return acc;
  endfunction

  // CIC decimator with pipelined integrators: output m is the full-rate
  // response at input index (m+1)*R-1-(N-1). mode 0 truncates by 2**shift,
  // mode 1 rounds half up by 2**shift and saturates to sat_w bits.
  function automatic lvec_t cic_model(input lvec_t x, int n, int r, int m,
                                      int shift, int mode, int sat_w);
    lvec_t h, y;
    int    nout;
    longint v;
    h = cic_impulse(n, r * m);
    nout = x.size() / r;
    y = new[nout];
    for (int o = 0; o < nout; o++) begin
      v = conv_at(x, h, (o + 1) * r - 1 - (n - 1));
      y[o] = (mode == 0) ? fdiv(v, shift) : sat(rdiv(v, shift), sat_w);
    end
    return y;
  endfunction

  // Half-band decimator: output m uses inputs up to index 2m+1, taps h with
  // 7 fraction bits, round half up, saturate to w bits.
  function automatic lvec_t hb_model(input lvec_t x, input lvec_t h, int w);
    lvec_t y;
    y = new[x.size() / 2];
    foreach (y[o]) y[o] = sat(rdiv(conv_at(x, h, 2 * o + 1), 7), w);
    return y;
  endfunction

  // Half-band taps used by the design, written out in full.
  function automatic lvec_t hb_taps(int order);
    lvec_t h;
    if (order == 10) h = '{1, 0, -7, 0, 38, 64, 38, 0, -7, 0, 1};
    else             h = '{-1, 0, 3, 0, -10, 0, 40, 64, 40, 0, -10, 0, 3, 0, -1};
    return h;
  endfunction

  // Corrector FIR: output m at input index n = 2m+1. Symmetric mode uses
  // c[0..ntaps/2-1] mirrored. The 43-bit sum loses 3 bits (floor) and is then
  // rounded by 2**fmt_shift and saturated to out_w bits.
  function automatic lvec_t fir_model(input lvec_t x, input lvec_t c,
                                      int ntaps, bit sym, int fmt_shift, int out_w);
    lvec_t y, h;
    h = new[ntaps];
    for (int k = 0; k < ntaps; k++) begin
      if (sym) h[k] = (k < ntaps / 2) ? c[k] : c[ntaps-1-k];
      else     h[k] = c[k];
    end
    y = new[x.size() / 2];
    foreach (y[o]) y[o] = sat(rdiv(fdiv(conv_at(x, h, 2 * o + 1), 3), fmt_shift), out_w);
    return y;
  endfunction

endpackage
