// decim_ref_pkg: reference arithmetic for the decimation-filter testbenches.
//
// Everything here works on plain 64-bit integers and direct convolutions, not
// on the recursive structures of the RTL, so that the testbenches compare the
// hardware against the filter definitions:
//   sinc_taps(M, L)       impulse response of ((1 - z^-M)/(1 - z^-1))^L,
//                         i.e. a length-M boxcar convolved with itself L times
//   fir_at(x, h, n)       sum_j h[j] * x[n-j], with x[i] = 0 for i < 0
//   halfband_taps(c, F)   full length-(4K-1) half-band impulse response from
//                         the K distinct taps c, centre 2**(F-1)
//   round_sat(v, F, W)    v / 2**F rounded (half up) and saturated to W bits
//   wrap(v, W)            v reduced to a W-bit two's complement value
package decim_ref_pkg;

  typedef longint q_t [$];

  function automatic q_t sinc_taps(int M, int L);
    q_t h, n;
    h = '{1};
    for (int s = 0; s < L; s++) begin
      n = {};
      for (int i = 0; i < h.size() + M - 1; i++) begin
        longint a = 0;
        for (int j = 0; j < M; j++)
          if (i - j >= 0 && i - j < h.size()) a += h[i-j];
        n.push_back(a);
      end
      h = n;
    end
    return h;
  endfunction

  function automatic longint fir_at(q_t x, q_t h, int n);
    longint a = 0;
    for (int j = 0; j < h.size(); j++)
      if (n - j >= 0 && n - j < x.size()) a += h[j] * x[n-j];
    return a;
  endfunction

  function automatic q_t halfband_taps(q_t c, int frac);
    q_t h;
    int K = c.size();
    h = {};
    for (int i = 0; i < 4 * K - 1; i++) h.push_back(0);
    h[2*K-1] = longint'(1) <<< (frac - 1);
    for (int k = 0; k < K; k++) begin
      h[2*K-1 - (2*k+1)] = c[k];
      h[2*K-1 + (2*k+1)] = c[k];
    end
    return h;
  endfunction

  function automatic longint round_sat(longint v, int frac, int w);
    longint r, mx, mn;
    r  = (v + (longint'(1) <<< (frac - 1))) >>> frac;
    mx = (longint'(1) <<< (w - 1)) - 1;
    mn = -(longint'(1) <<< (w - 1));
    if (r > mx) return mx;
    if (r < mn) return mn;
    return r;
  endfunction

  function automatic longint wrap(longint v, int w);
    longint m;
    m = v & ((longint'(1) <<< w) - 1);
    if (m >= (longint'(1) <<< (w - 1))) m -= longint'(1) <<< w;
    return m;
  endfunction

endpackage
