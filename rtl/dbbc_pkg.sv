// dbbc_pkg: constants and elaboration-time functions shared by the digital base
// band converter (DBBC) blocks.
//
// The converter takes a 4-bit, 1.024 GS/s IF sample stream, mixes a 62.5 kHz-step
// slice of it down to base band, decimates by 32 with a CIC filter and separates the
// upper and lower sidebands with the phasing method. The rates (1024, 512, 64 and
// 32 MS/s), the 16-lane parallelism, the 4-bit words and the 64-tap final filter
// follow the published prototype. Everything here that computes a table or a set of
// filter coefficients runs only at elaboration; no real arithmetic reaches hardware.
// The coefficient formulas (inverse-sinc Taylor match, Hamming-windowed Hilbert and
// low-pass designs) are this design's own choices: the prototype's coefficients were
// never published.
package dbbc_pkg;

  localparam real PI        = 3.14159265358979323846;
  // Module parameters carry the sizes (16 lanes, 4-bit samples, 14-bit phase, ...).

  // Round a real to the nearest integer, halves away from zero.
  function automatic longint round_r(real v);
    return (v >= 0.0) ? longint'($rtoi(v + 0.5)) : -longint'($rtoi(-v + 0.5));
  endfunction

  // Binomial coefficient C(n, k), 0 when k is out of range.
  function automatic longint binom(int n, int k);
    longint r = 1;
    longint nl = 64'(n);
    longint kl = 64'(k);
    if (k < 0 || k > n) return 0;
    for (longint i = 1; i <= kl; i++) r = r * (nl - kl + i) / i;
    return r;
  endfunction

  // Mixer table: round(x * sin or cos of phase p), scaled from sample_w to mix_w
  // bits and clipped to the mix_w-bit two's complement range.
  function automatic int mix_lut(int x, int p, int phase_w, bit use_cos,
                                 int sample_w, int mix_w);
    real ang = 2.0 * PI * p / (2.0 ** phase_w);
    real lo  = use_cos ? $cos(ang) : $sin(ang);
    longint v = round_r(x * lo * (2.0 ** (mix_w - sample_w)));
    longint hi = (longint'(1) << (mix_w - 1)) - 1;
    if (v > hi) v = hi;
    if (v < -hi - 1) v = -hi - 1;
    return int'(v);
  endfunction

  // Block form of an N-stage integrator cascade s_k[t] = s_k[t-1] + s_{k-1}[t]
  // (s_0 = input) advanced over a block of L inputs x_0 (earliest) .. x_{L-1}:
  //   s_k' = sum_{j<=k} cic_g(k,j,L) * s_j + sum_i cic_w(k,i,L) * x_i
  function automatic longint cic_w(int k, int i, int l);
    return binom(k - 1 + (l - 1 - i), k - 1);
  endfunction
  // Distributed-arithmetic table entry: sum of the cic_w weights of state k over
  // the lanes of group g whose bit is set in address a.
  function automatic longint da_entry(int k, int g, int a, int group, int l);
    longint sum = 0;
    for (int j = 0; j < group; j++)
      if (((a >> j) & 1) != 0) sum += cic_w(k, g * group + j, l);
    return sum;
  endfunction
  function automatic longint cic_g(int k, int j, int l);
    return (j > k) ? 0 : binom(l + k - j - 1, k - j);
  endfunction

  function automatic real hamming(int k, int n);
    return 0.54 - 0.46 * $cos(2.0 * PI * k / (n - 1));
  endfunction

endpackage
