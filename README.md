# PDM microphone to MFCC front end

This is the programmable-logic half of a small speech-command recogniser on a
Zynq-class SoC (PYNQ-Z1 board). A MEMS microphone on the board delivers a
1-bit pulse-density-modulated (PDM) stream. The logic turns that stream into
Mel-frequency cepstral coefficients (MFCCs): 10 signed numbers for every 256
audio samples. A neural network running as software on the ARM cores uses them
to tell a handful of commands apart ("forward", "back", "left", "right",
"stop", none). A DMA engine carries the coefficients into memory. The network
and the DMA engine are not part of this RTL; the MFCC stream is a top-level
AXI-Stream port.

```
 pdm_data ──► pynq_mic ──8-bit PDM beats──► fir_decimator ──16-bit PCM──► mfcc_extractor ──32-bit MFCC──► DMA
 pdm_clock ◄─┘  (clock gen,                 (64:1 polyphase                 preemph → window → FFT →
                 packing, tlast)             low-pass, reload)              Mel bank → log10 → DCT-II
```

Everything runs on one clock, `aclk` (100 MHz on the board). With the defaults:

| quantity | value |
|---|---|
| PDM clock | aclk / 32 = 3.125 MHz |
| decimation | 64 → PCM rate 48.83 kHz, one sample every 2,048 aclk cycles |
| frame | 256 PCM samples (5.2 ms), no overlap |
| FFT | 256-point radix-2, bins 0..128 used |
| Mel filters | 32 triangles from 0 Hz to 24 kHz |
| cepstral coefficients | 10 per frame, each in a 32-bit word |

## The blocks

### Microphone interface (`pynq_mic`)

A counter divides `aclk` by `CLK_DIV` to make `pdm_clock`. The microphone is
used on its default channel: it drives its data after the falling edge of the
clock, and the interface samples it when the clock rises. The data line passes
a two-flop synchroniser first. So the bit taken in the first `aclk` cycle of
each high phase is the value `pdm_data` had two cycles earlier.

Bits are packed LSB-first into `TDATA_W`-bit (8-bit) AXI-Stream beats, and
`tlast` marks every `FRAME_WORDS`-th beat. Raising `start_recording` starts
recording. Recording stops only at the end of a frame, and only if
`start_recording` is low by then. The output register is not a FIFO. If a beat
is still unread when the next one is complete, it is overwritten and `overrun`
pulses. The filter downstream takes a beat in 9 cycles and a beat arrives every
256, so this never happens in the assembled design.

### PDM to PCM (`fir_decimator`)

This is a low-pass FIR filter combined with 64:1 decimation in polyphase form:
only the kept outputs are computed. PDM bits count as +1 or −1, so a tap needs
no multiplier. Each input bit adds or subtracts one coefficient in each of `L`
running accumulators. The filter has `TAPS = L·M = 128` coefficients, and output
`b` is

```
y[b] = sat16( Σ_{k=0}^{127} h[k] · x[64·b + 63 − k] )       x = ±1, x[<0] = 0
```

After 64 bits, accumulator 0 holds a finished output and the accumulators shift
down by one. The cost is one cycle per bit plus one per beat, with no
multipliers and `L` adders.

The reset coefficients form a triangle: two length-64 boxcars convolved, which
is the response of a second-order CIC filter. It is scaled so that an all-ones
input gives full scale:

```
h[k] = min(k+1, 127−k) · (32768 / 64²),   k = 0..127
```

Its first null is at the output rate, and it is 3 dB down at about 15.6 kHz.

A better filter can be loaded while the filter runs. There are two
coefficient banks, and both start with the triangle.
- `s_axis_reload` takes 128 signed 16-bit coefficients, one per cycle and in
  tap order. `tlast` sends the write pointer back to tap 0. The words go into
  the bank that the latest config beat did *not* select, so loading never
  disturbs the running filter.
- A one-byte beat on `s_axis_config` selects the filtering bank with its bit 0.
  The switch happens at the next block boundary. Because two blocks overlap
  (`L = 2`), the first output after a switch is half old set, half new.

To load and use a new filter, reload it, then send one config beat naming the
other bank. Both ports are always ready.

The output `tlast` marks the PCM sample whose block contains the last bit of a
`tlast` beat. The FIR IP core that this block stands in for also has `tuser`,
clock-enable and error-event signals. They are left out: there is one channel
and no variable-length packet to check.

### MFCC core (`mfcc_extractor`)

The core is six stages joined by valid/ready handshakes. Frames are counted in
samples. The PCM `tlast` is not used to form them.

| stage | module | operation | output format |
|---|---|---|---|
| pre-emphasis | `mfcc_preemph` | y[n] = x[n] − x[n−1] + (x[n−1] >>> 5), i.e. α = 1 − 1/32 | 17-bit signed |
| window | `mfcc_window` | y = (x · w[n]) >>> 16, w[n] = 0.54 − 0.46·cos(2πn/255) in Q0.16 | 17-bit signed, index n |
| FFT | `fft_r2` | 256-point radix-2 DIT, in place | 24-bit re/im = X[k]·64/256 |
| Mel bank | `mel_filterbank` | E[m] = Σ_k H_m(k)·(re² + im²) | 64-bit unsigned |
| log | `log_unit` | 256·log10(E) (approximate) | 16-bit unsigned Q8.8 decades |
| DCT | `dct2` | C[n] = Σ_i L[i]·cos(πn(i+½)/32), n = 0..9 | signed, sign-extended to 32 bits |

So the unit of an output MFCC is 1/256 of a decade of filter energy.

**FFT.** It is memory-based. The 256 windowed samples are written to
bit-reversed addresses and shifted left by 6 for headroom. Then 8 stages of 128
butterflies run at one butterfly per cycle. Each butterfly output is halved
(rounding down), which keeps the 24-bit words from overflowing. Finally bins 0
to 128 are read out in order. Twiddle factors are Q1.14. While the 1,024
butterfly cycles run (`fft_busy`), the core does not accept samples. The
pre-emphasis and window registers absorb the one sample that arrives in that
time.

**Mel bank.** The 34 filter edges are equally spaced on the Mel scale,
2595·log10(1 + f/700), from 0 to 24 kHz. Each edge is rounded down to an FFT
bin. For every bin the elaboration-time tables hold the filter whose rising
slope it lies on, `seg`, and that slope's weight in Q0.8, `wgt`. The same bin
contributes `256 − wgt` to the falling slope of filter `seg − 1`. So each bin
needs one squaring pair and two accumulations. The narrowest low filters
contain no bin at all and always read 0. At 256 points the bins are 187.5 Hz
apart, coarser than the first Mel bands.

**Logarithm.** It uses a leading-one detector plus a linear mantissa
(Mitchell's approximation). The position of the leading one gives the integer
part of log2. The next 8 bits are used directly as the fraction, since
log2(1+f) ≈ f. The result is multiplied by log10(2) in Q0.16 (19728). The
approximation always reads low, by at most 0.086 in log2. That is 6.6 output
LSBs, or 0.026 decades. An energy of 0 gives 0.

**DCT-II.** It uses one multiply-accumulate per cycle with Q1.14 cosines, so 320
cycles per frame. Each coefficient leaves as a one-cycle `tvalid` pulse, and
`tlast` is set on C[9].

**The output does not wait.** `m_axis_mfcc_tvalid` is a strobe, and
`m_axis_mfcc_tready` does not hold the pipeline back. If the consumer is not
ready, the word is lost and `mfcc_dropped` pulses one cycle later. This keeps
the chain free of back-pressure towards the microphone, which cannot be paused.
The DMA engine is expected to be always ready.

**Tables.** All tables are computed when the design is elaborated, by constant
functions in `sfe_pkg` using `$cos`, `$log10` and `$pow`. These are the window,
the twiddles, the Mel `seg`/`wgt` tables and the DCT cosines. No data files are
needed. Changing `FRAME_LEN`, `NUM_MEL`, `NUM_CEPS` or `FS_PCM_HZ` in the
package regenerates them.

### Top (`speech_frontend_top`)

The top chains the three blocks. It brings out:
- the microphone pins: `pdm_clock`, `pdm_data`, `start_recording`, `recording`;
- the FIR coefficient config and reload streams;
- the MFCC stream;
- two status pulses: `mic_overrun` and `mfcc_dropped`.

Parameters are `CLK_DIV` (default 32) and `FRAME_WORDS` (default 256). The
numeric sizes of the MFCC core are in `rtl/sfe_pkg.sv`.

## Timing budget

A frame needs roughly this many cycles:
- 256 to load;
- 1,024 for the butterflies;
- 129 to read the bins;
- about 70 for the Mel bank and log;
- 320 for the DCT.

That is about 1,800 cycles. A new frame of input takes 256 × 2,048 = 524,288
cycles, so the core is idle over 99% of the time. A 1-second utterance
(199 frames × 10 = 1,990 coefficients, the input size of the network it was
built for) comes out 1.04 s after recording starts.

## Where this departs from the original design description

- **PDM clock.** The description works with 3.072 MHz and 64:1 decimation to get
  exactly 48 kHz. A 100 MHz clock cannot be divided to 3.072 MHz by an integer.
  The default is 3.125 MHz, giving 48.83 kHz PCM. The Mel and window tables
  assume 48 kHz, so filter centre frequencies read 1.7% low. Set `CLK_DIV`, or
  feed a 98.304 MHz `aclk`, to get 48 kHz exactly.
- **Filter coefficients.** The description has them designed offline and loaded
  into a FIR IP core, without printing them. The reset set here is the
  CIC-style triangle above. The reload port accepts a proper design.
- **Filter pass band.** The description suggests a low-pass that "accepts up to
  48 kHz". That is above the 24 kHz Nyquist limit of the output. The reset
  filter instead follows the output rate.
- **Frame length.** Frames are 256 samples (5.3 ms at 48 kHz). The description
  also mentions 20–40 ms frames; 256 was kept because it sets the FFT size.
  Frames do not overlap.
- **Mel input.** The Mel bank takes the power spectrum, not the magnitude. One
  formula in the description uses |X(k)|; its implementation text says power
  spectrum.
- **Logarithm.** The logarithm is the simple approximation above; the
  description refers to a published method it does not reproduce. It is taken
  once, base 10.
- **DCT.** The DCT is the standard unnormalised DCT-II.
- **Number of coefficients.** Ten coefficients per frame is an inference: the
  network's input layer has 1,990 inputs, which is 199 frames of 10. The
  description states no number.
- **Output words.** Sign-extended to 32 bits, following the description's
  advice that every value be a multiple of 8 bits (e.g. `uint32` on the
  software side).
- **Status outputs.** `overrun`, `dropped`, `recording` and `fft_busy` are
  additions.

## Accuracy

The testbenches compare against floating-point arithmetic. Their tolerances
are derived from the fixed-point formats, not tuned:

- Window: the product is rounded down and the table is rounded to Q0.16, so the
  result is within −1.51 / +0.51 LSB.
- FFT: within 8 LSB plus 1/4096 of the sum of input magnitudes (8 stages of
  halving with rounding down, Q1.14 twiddles).
- Mel bank: within 1 + ΣP/512 of the exact triangle weights, because of the
  Q0.8 weights.
- Log: between 8 LSB low and 0 high, or 1.1 LSB low for exact powers of two.
- MFCC: each filter may read up to 8 LSB low from the logarithm. On top of
  that, each bin's amplitude may be off by a small absolute amount. That amount
  is large only at DC, where the round-down biases of pre-emphasis, window and
  butterflies add up. After pre-emphasis the DC bin carries almost no
  signal. So the lowest non-empty filter, which at 256 points holds only the
  DC bin, is dominated by this bias and can read anything from 0 up.
  Through the DCT, that one filter is the largest error source. Over a full
  second of two-tone input, the largest MFCC error seen was about 950 (the
  unit is 1/256 decade). All other filters stay within about 10 of the
  exact logarithm.

If the bias at DC matters, round instead of truncating in `mfcc_preemph` and
`mfcc_window`.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pynq_mic` | clock period and duty cycle; bit packing and order; tlast period; start and stop at a frame boundary; overrun with a stalled consumer |
| `tb_fir_decimator` | every output against a direct convolution; random stalls on both sides; the AXI hold rule; tlast mapping; throughput of 9 cycles per beat; reload of random coefficients and bank switches before and during streaming |
| `tb_mfcc_preemph`, `tb_mfcc_window` | exact or bounded results; back-pressure; frame index and last |
| `tb_fft_r2` | all 129 bins against a direct DFT; latency |
| `tb_mel_filterbank` | energies against exact triangles computed from the Mel formula |
| `tb_log_unit` | approximation bounds over random and edge values; zero input |
| `tb_dct2` | coefficients against a real-valued DCT; the non-waiting output and `dropped` |
| `tb_mfcc_extractor` | five frames of PCM against a floating-point MFCC model (`tb_mfcc_ref_pkg`) |
| `tb_speech_frontend_top` | the whole design at its default parameters (below) |
| `tb_utterance` | one second of audio at default parameters: exactly 1,990 MFCC words (199 frames), all compared |

`tb_speech_frontend_top` drives the top, with no parameter overrides, from
`pdm_mic_model`. That model is a first-order delta-sigma modulator fed with a
1 kHz and a 5 kHz tone plus noise. The testbench uses only the top's pins:

1. It rebuilds the PDM bits the interface takes, using the sampling rule above.
2. It filters them with its own copy of the coefficients, so it knows every PCM
   sample exactly.
3. It checks each MFCC word against the floating-point model of those samples.

Along the way it:
- records five frames;
- loads halved coefficients into the idle bank while data streams, and checks
  that the frame that follows is unchanged;
- switches to that bank a frame later (the one frame that straddles the
  switch is not compared);
- holds `m_axis_mfcc_tready` low for one frame and checks that exactly 10
  `mfcc_dropped` pulses appear;
- stops recording and checks that it ends on a microphone frame boundary.

It counts each of these events and prints the counts. The run covers about 27
ms of design time and takes a few seconds.

`tb_utterance` runs the size the network needs: one input vector of 1,990
values. The microphone model plays 440 Hz and 2.5 kHz tones plus noise.
`start_recording` is released inside the last microphone frame, so recording
stops after exactly 199 × 256 PCM samples. The testbench checks:
- that exactly 1,990 words arrive, with `tlast` on every tenth;
- that every word matches the floating-point model;
- that nothing is dropped and the microphone never overruns.

It simulates about 104 million cycles, which takes one to two minutes.

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/sfe_pkg.sv tb/tb_mfcc_ref_pkg.sv tb/tb_speech_frontend_top.sv \
    --top-module tb_speech_frontend_top -o sim
./obj_dir/sim
```

Substitute another testbench name for the last file and the top module. The
testbenches that do not use the reference model can omit
`tb/tb_mfcc_ref_pkg.sv`. Handshake rules are also checked by immediate
assertions in the RTL, which Verilator evaluates with `--assert`.

## Files

- `rtl/sfe_pkg.sv`: shared sizes and the table-building functions.
- `rtl/pynq_mic.sv`, `rtl/fir_decimator.sv`: microphone interface and PDM-to-PCM
  filter.
- `rtl/mfcc_preemph.sv`, `rtl/mfcc_window.sv`, `rtl/fft_r2.sv`,
  `rtl/mel_filterbank.sv`, `rtl/log_unit.sv`, `rtl/dct2.sv`: the MFCC stages.
- `rtl/mfcc_extractor.sv`: the MFCC chain.
- `rtl/speech_frontend_top.sv`: the top.
- `tb/pdm_mic_model.sv`: behavioural microphone (simulation only).
- `tb/tb_mfcc_ref_pkg.sv`: floating-point MFCC reference.
- `tb/tb_*.sv`: testbenches.
