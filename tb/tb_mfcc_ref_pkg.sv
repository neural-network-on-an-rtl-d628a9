// tb_mfcc_ref_pkg -- floating-point reference of the MFCC computation, used
// by the testbenches to check the fixed-point hardware.
//
// mfcc_ref() takes one frame of PCM samples plus the sample that preceded the
// frame and computes, in real arithmetic and by direct evaluation of the
// textbook formulas (no FFT, no tables shared with the RTL):
//   pre-emphasis   y[n] = x[n] - 0.96875 x[n-1]
//   Hamming window 0.54 - 0.46 cos(2 pi n / (N-1))
//   DFT            X[k] = sum_n y[n] w[n] exp(-j 2 pi n k / N), k = 0..N/2
//   scaling        the RTL FFT returns X * 2^SHIFT / N; the same factor is
//                  applied so that the energies can be compared
//   Mel bank       triangles on edges equally spaced in Mel (2595 log10(1+f/700))
//                  from 0 to fs/2, edges rounded down to bins, built with the
//                  usual rising/falling loops
//   log            log10(max(E, 1)) * 256
//   DCT-II         C[n] = sum_i L[i] cos(pi n (i + 0.5) / M)
package tb_mfcc_ref_pkg;

  localparam int  N     = 256;
  localparam int  NB    = N / 2 + 1;
  localparam int  FS    = 48000;
  localparam int  NMEL  = 32;
  localparam int  NCEPS = 10;
  localparam real PI    = 3.14159265358979323846;
  localparam real FFT_GAIN = 64.0 / 256.0;   // 2^(24-17-1) / N

  typedef real frame_t [N];
  typedef real mel_t   [NMEL];
  typedef real ceps_t  [NCEPS];

  function automatic real mel_of(input real f);
    return 2595.0 * $log10(1.0 + f / 700.0);
  endfunction

  function automatic real hz_of(input real m);
    return 700.0 * ($pow(10.0, m / 2595.0) - 1.0);
  endfunction

  typedef real pow_t [NB];

  // Edge bins of the filter bank.
  function automatic void mel_edges(output int edg [NMEL + 2]);
    real top;
    top = mel_of(FS / 2.0);
    for (int j = 0; j < NMEL + 2; j++) edg[j] = $rtoi(N * hz_of(top * j / (NMEL + 1)) / FS);
  endfunction

  // Mel energies of a power spectrum (bins 0 .. N/2).
  function automatic mel_t mel_of_power(input pow_t p);
    mel_t e;
    int   edg [NMEL + 2];
    mel_edges(edg);
    for (int m = 0; m < NMEL; m++) begin
      e[m] = 0.0;
      for (int k = edg[m]; k < edg[m + 1]; k++)
        e[m] += p[k] * (k - edg[m]) / real'(edg[m + 1] - edg[m]);
      for (int k = edg[m + 1]; k < edg[m + 2]; k++)
        if (k < NB) e[m] += p[k] * (edg[m + 2] - k) / real'(edg[m + 2] - edg[m + 1]);
    end
    return e;
  endfunction

  // Scaled power spectrum (bins 0 .. N/2) of a frame of windowed samples.
  function automatic pow_t power_of(input frame_t xw);
    pow_t p;
    real  re, im;
    for (int k = 0; k < NB; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < N; n++) begin
        re += xw[n] * $cos(2.0 * PI * n * k / N);
        im -= xw[n] * $sin(2.0 * PI * n * k / N);
      end
      re *= FFT_GAIN; im *= FFT_GAIN;
      p[k] = re * re + im * im;
    end
    return p;
  endfunction

  // Mel energies of a frame of already windowed samples.
  function automatic mel_t mel_energies(input frame_t xw);
    return mel_of_power(power_of(xw));
  endfunction

  function automatic ceps_t dct_of(input mel_t lg);
    ceps_t c;
    for (int n = 0; n < NCEPS; n++) begin
      c[n] = 0.0;
      for (int i = 0; i < NMEL; i++) c[n] += lg[i] * $cos(PI * n * (i + 0.5) / NMEL);
    end
    return c;
  endfunction

  // Pre-emphasised and windowed frame.
  function automatic frame_t windowed(input frame_t pcm, input real prev);
    frame_t xw;
    real    p;
    p = prev;
    for (int n = 0; n < N; n++) begin
      xw[n] = (pcm[n] - 0.96875 * p) * (0.54 - 0.46 * $cos(2.0 * PI * n / (N - 1)));
      p = pcm[n];
    end
    return xw;
  endfunction

  // Full reference: PCM frame (and the sample before it) -> MFCCs in 1/256
  // decades.
  function automatic ceps_t mfcc_ref(input frame_t pcm, input real prev);
    mel_t lg, e;
    e = mel_energies(windowed(pcm, prev));
    for (int i = 0; i < NMEL; i++) lg[i] = 256.0 * $log10(e[i] < 1.0 ? 1.0 : e[i]);
    return dct_of(lg);
  endfunction

  // Allowed deviation of each hardware MFCC from mfcc_ref().  Per filter the
  // log may read up to 8 low (piecewise linear log2 plus truncations).  On top
  // of that each FFT bin may be off by an absolute amplitude
  // EPS + FFT_GAIN * sum|xw| / 4096 (butterfly truncation and Q1.14 twiddles,
  // the bound the FFT's own testbench uses), plus EPS_DC at bin 0, where the
  // rounding-down of pre-emphasis, window and butterflies all add up; a
  // filter energy E may then be off by
  // dE = sum_k w_k (2 eps_k sqrt(P_k) + eps_k^2), i.e. 256 log10(1 + dE/E) in
  // the log.  The per-filter bounds are summed with |cos| weights of the DCT.
  localparam real EPS = 8.0, EPS_DC = 64.0;
  function automatic ceps_t mfcc_tol(input frame_t pcm, input real prev);
    pow_t  p, dp;
    mel_t  e, de, tl;
    ceps_t t;
    real   eps, c;
    frame_t xw;
    real    mag;
    xw  = windowed(pcm, prev);
    p   = power_of(xw);
    mag = 0.0;
    for (int n = 0; n < N; n++) mag += (xw[n] < 0.0) ? -xw[n] : xw[n];
    for (int k = 0; k < NB; k++) begin
      eps = EPS + FFT_GAIN * mag / 4096.0 + ((k == 0) ? EPS_DC : 0.0);
      dp[k] = 2.0 * eps * $sqrt(p[k]) + eps * eps;
    end
    e  = mel_of_power(p);
    de = mel_of_power(dp);
    for (int i = 0; i < NMEL; i++) begin
      tl[i] = 8.0 + 256.0 * $log10(1.0 + de[i] / (e[i] < 1.0 ? 1.0 : e[i]));
      // a filter whose energy may be rounded away entirely (in practice the
      // one holding only the DC bin) may read anything from 0 up
      if (e[i] - de[i] < 1.0 && e[i] > 1.0 && 256.0 * $log10(e[i]) + 8.0 > tl[i])
        tl[i] = 256.0 * $log10(e[i]) + 8.0;
    end
    for (int n = 0; n < NCEPS; n++) begin
      t[n] = 1.0;
      for (int i = 0; i < NMEL; i++) begin c = $cos(PI * n * (i + 0.5) / NMEL); t[n] += tl[i] * (c < 0.0 ? -c : c); end
    end
    return t;
  endfunction

endpackage
