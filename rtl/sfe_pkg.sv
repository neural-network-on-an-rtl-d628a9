// sfe_pkg -- shared constants and constant table generators of the speech
// feature front end (PDM microphone -> PCM -> MFCC).
//
// The numbers that come from the design description are: a PCM rate of
// 48 kHz reached by decimating the PDM stream by 64, a frame (FFT) length of
// 256 samples, a pre-emphasis coefficient of 1 - 1/32, a Hamming window,
// 32 triangular Mel filters and a type II DCT.  Word widths, the number of
// cepstral coefficients and all fixed-point formats are choices of this
// implementation.
//
// All coefficient tables (Hamming window, FFT twiddles, Mel filter segment
// map, DCT cosines) are computed at elaboration time by the constant
// functions below from their closed-form formulas, so there are no data
// files:
//   hamming(n)      = 0.54 - 0.46*cos(2*pi*n/(N-1))            , unsigned Q0.16
//   twiddle(k)      = cos(2*pi*k/N), -sin(2*pi*k/N)            , signed Q1.14
//   mel(f)          = 2595*log10(1 + f/700)
//   dct_cos(n,i)    = cos(pi*n*(i+0.5)/M)                      , signed Q1.14
package sfe_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned PDM_TDATA_W = 8;      // PDM bits per AXI-Stream beat
  localparam int unsigned DECIM_M     = 64;     // PDM -> PCM decimation factor
  localparam int unsigned PCM_W       = 16;     // PCM sample width
  localparam int unsigned FS_PCM_HZ   = 48000;  // PCM sample rate
  localparam int unsigned FRAME_LEN   = 256;    // samples per frame = FFT size
  localparam int unsigned NUM_MEL     = 32;     // triangular Mel filters
  localparam int unsigned NUM_CEPS    = 10;     // MFCCs emitted per frame
  localparam int unsigned MFCC_W      = 32;     // MFCC word on the output stream

  localparam int unsigned PRE_W  = PCM_W + 1;   // pre-emphasis / window width
  localparam int unsigned FFT_DW = 24;          // FFT internal word
  localparam int unsigned TW_W   = 16;          // twiddle / cosine word, Q1.14
  localparam int unsigned TW_FRAC = 14;
  localparam int unsigned MEL_W  = 64;          // Mel energy accumulator
  localparam int unsigned WGT_FRAC = 8;         // Mel weight fraction bits (Q0.8, 256 = 1.0)
  localparam int unsigned LOG_W  = 16;          // log10 output, unsigned Q8.8

  localparam real PI = 3.14159265358979323846;

  function automatic int rnd(input real x);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  // Hamming window coefficient n of an N-point window, unsigned Q0.16.
  function automatic logic [15:0] hamming_q16(input int n, input int N);
    real w;
    int  v;
    w = 0.54 - 0.46 * $cos(2.0 * PI * n / (N - 1));
    v = rnd(w * 65536.0);
    if (v > 65535) v = 65535;
    return 16'(v);
  endfunction

  // cos(pi * num / den) in signed Q1.14.
  function automatic logic signed [TW_W-1:0] cos_q14(input int num, input int den);
    return TW_W'(rnd($cos(PI * num / den) * real'(1 << TW_FRAC)));
  endfunction

  // Mel scale and its inverse.
  function automatic real hz_to_mel(input real f);
    return 2595.0 * $log10(1.0 + f / 700.0);
  endfunction

  function automatic real mel_to_hz(input real m);
    return 700.0 * ($pow(10.0, m / 2595.0) - 1.0);
  endfunction

  // FFT bin on which edge point j (0 .. nmel+1) of the filter bank lies.
  // The nmel+2 edge points are equally spaced in Mel from 0 Hz to fs/2.
  function automatic int mel_edge_bin(input int j, input int nmel, input int nfft, input int fs);
    real mhi, hz;
    mhi = hz_to_mel(real'(fs) / 2.0);
    hz  = mel_to_hz(mhi * j / (nmel + 1));
    return $rtoi(real'(nfft) * hz / real'(fs));
  endfunction

  // Segment of the filter bank that FFT bin k falls in: the largest j with
  // edge(j) <= k.  Bin k then lies on the rising slope of filter j and on the
  // falling slope of filter j-1.  nmel+1 means "beyond the last filter".
  function automatic int mel_seg(input int k, input int nmel, input int nfft, input int fs);
    int s;
    s = 0;
    for (int j = 0; j <= nmel + 1; j++)
      if (mel_edge_bin(j, nmel, nfft, fs) <= k) s = j;
    return s;
  endfunction

  // Rising-slope weight of bin k inside its segment, Q0.8 (0 .. 256).
  // The falling-slope weight of the same bin is 256 minus this.
  function automatic int mel_wgt(input int k, input int nmel, input int nfft, input int fs);
    int s, lo, hi;
    s = mel_seg(k, nmel, nfft, fs);
    if (s > nmel) return 0;
    lo = mel_edge_bin(s, nmel, nfft, fs);
    hi = mel_edge_bin(s + 1, nmel, nfft, fs);
    if (hi <= lo) return 0;
    return rnd(real'(k - lo) * real'(1 << WGT_FRAC) / real'(hi - lo));
  endfunction

  // Bit reversal of an index of the given width.
  function automatic int unsigned bitrev(input int unsigned v, input int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned b = 0; b < bits; b++)
      if (v[b]) r |= 1 << (bits - 1 - b);
    return r;
  endfunction

endpackage
