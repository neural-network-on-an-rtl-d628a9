// tb_speech_frontend_top -- end-to-end testbench of the whole front end at
// its default (full-size) parameters: 100 MHz clock, PDM clock of aclk/32,
// 64:1 decimation, frames of 256 PCM samples, 32 Mel filters, 10 MFCCs.
//
// A delta-sigma microphone model (1 kHz and 5 kHz tones plus noise) drives
// pdm_data.  Only the top-level ports are used.  The testbench keeps its own
// copy of the PDM bits the interface takes (pdm_data two aclk cycles before
// the first cycle of each pdm_clock high phase, while recording), filters them
// with its own copy of the coefficients and so knows every PCM sample
// exactly.  It checks:
//   * PDM clock period and duty cycle, recording start and stop (recording
//     ends on a microphone frame boundary and, once the last beat has
//     been taken, no beat follows);
//   * every MFCC word against the floating-point reference of
//     tb_mfcc_ref_pkg applied to those PCM samples (tlast on every 10th
//     word); the PCM samples use the reset coefficients and, after halved
//     coefficients have been loaded into the idle bank during streaming
//     (which must not disturb the output) and a config beat has selected
//     that bank, the new ones -- the frame holding the few samples that
//     straddle the switch is not compared;
//   * one MFCC frame per 256 PCM samples, none for a partial frame;
//   * one MFCC frame with m_axis_mfcc_tready low: the words still appear and
//     mfcc_dropped pulses once per word;
//   * mic_overrun never pulses (the filter takes a beat in 9 cycles, a beat
//     arrives every 256).
// At the end the number of times each mechanism was seen is printed.
module tb_speech_frontend_top;
  import tb_mfcc_ref_pkg::*;
  localparam int CLK_DIV = 32, FRAME_WORDS = 256, M = 64, TAPS = 128;
  localparam int PCM_PER_TLAST = FRAME_WORDS * 8 / M;
  localparam int NFRAMES = 5, DROP_FRAME = 3, RELOAD_AFTER = 2;

  logic aclk = 0, aresetn = 0;
  logic pdm_clock, pdm_data, start_recording = 0, recording;
  logic signed [15:0] r_tdata = 0;
  logic r_tvalid = 0, r_tready, r_tlast = 0;
  logic [7:0] c_tdata = 0;
  logic c_tvalid = 0, c_tready;
  logic [31:0] mfcc_tdata;
  logic mfcc_tvalid, mfcc_tready = 1, mfcc_tlast;
  logic mic_overrun, mfcc_dropped;
  int checks = 0, failures = 0;

  speech_frontend_top dut (
    .aclk, .aresetn, .pdm_clock, .pdm_data, .start_recording, .recording,
    .s_axis_config_tdata(c_tdata), .s_axis_config_tvalid(c_tvalid), .s_axis_config_tready(c_tready),
    .s_axis_reload_tdata(r_tdata), .s_axis_reload_tvalid(r_tvalid), .s_axis_reload_tready(r_tready),
    .s_axis_reload_tlast(r_tlast),
    .m_axis_mfcc_tdata(mfcc_tdata), .m_axis_mfcc_tvalid(mfcc_tvalid), .m_axis_mfcc_tready(mfcc_tready),
    .m_axis_mfcc_tlast(mfcc_tlast), .mic_overrun, .mfcc_dropped);

  pdm_mic_model mic (.pdm_clock, .pdm_data);

  always #5 aclk = ~aclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ references
  int h_old [TAPS], h_new [TAPS];
  initial
    for (int k = 0; k < TAPS; k++) begin
      int t;
      t = (k + 1 < 2 * M - 1 - k) ? k + 1 : 2 * M - 1 - k;
      h_old[k] = t * (32768 / (M * M));
      h_new[k] = h_old[k] / 2;
    end

  bit  xq [$];                 // PDM bits taken by the microphone interface
  int  sw_bit = -1;            // PDM bits taken when the bank switch was requested
  int  npcm = 0, nframe_in = 0, skip_frame = -1;

  function automatic int pcm_expect(input int b, input bit use_new);
    longint acc;
    int     i;
    acc = 0;
    for (int k = 0; k < TAPS; k++) begin
      i = b * M + M - 1 - k;
      if (i >= 0) acc += (xq[i] ? 1 : -1) * (use_new ? h_new[k] : h_old[k]);
    end
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  // ------------------------------------------------------------- counters
  int n_mic_bits = 0, n_pcm = 0, n_mfcc_words = 0, n_mfcc_frames = 0, n_mfcc_checked = 0;
  int n_dropped = 0, n_overrun = 0, n_reload_words = 0, n_bank_switch = 0, n_rec_start = 0, n_rec_stop = 0;
  logic rec_q = 0, pclk_q = 0, d1 = 0, d2 = 0;

  real pcm [$], ref_q [$], tol_q [$];
  real prev = 0.0, cur, tol;
  ceps_t c, t;
  int  ncoef = 0, cur_frame = 0;
  int  frame_q [$];

  always @(posedge aclk) if (aresetn) begin
    // microphone: at the first aclk cycle of each pdm_clock high phase the
    // interface takes pdm_data as it was two cycles earlier
    if (recording && pdm_clock && !pclk_q) begin
      xq.push_back(d2);
      n_mic_bits++;
      if (xq.size() == (npcm + 1) * M) begin
        int lo, hi, y;
        bit straddle;
        lo = npcm * M - M; hi = npcm * M + M - 1;
        straddle = sw_bit >= 0 && hi >= sw_bit - 16 && lo <= sw_bit + M + 16;
        if (straddle) skip_frame = nframe_in;
        y = pcm_expect(npcm, sw_bit >= 0 && lo > sw_bit + M + 16);
        npcm++;
        pcm.push_back(real'(y));
        if (pcm.size() == N) begin
          frame_t f;
          foreach (f[n]) f[n] = pcm[n];
          c = mfcc_ref(f, prev);
          t = mfcc_tol(f, prev);
          foreach (c[k]) begin ref_q.push_back(c[k]); tol_q.push_back(t[k]); end
          frame_q.push_back(nframe_in);
          nframe_in++;
          prev = pcm[N - 1];
          pcm.delete();
        end
      end
    end
    pclk_q <= pdm_clock;
    d1 <= pdm_data;
    d2 <= d1;
    if (r_tvalid && r_tready) n_reload_words++;
    if (c_tvalid && c_tready) begin
      n_bank_switch++;
      sw_bit = xq.size();
    end
    if (mic_overrun) n_overrun++;
    if (recording && !rec_q) n_rec_start++;
    if (!recording && rec_q) n_rec_stop++;
    rec_q <= recording;
    // MFCC stream
    if (mfcc_dropped) n_dropped++;
    if (mfcc_tvalid) begin
      if (ncoef == 0) cur_frame = (frame_q.size() > 0) ? frame_q.pop_front() : -1;
      cur = (ref_q.size() > 0) ? ref_q.pop_front() : 0.0;
      tol = (tol_q.size() > 0) ? tol_q.pop_front() : 0.0;
      if (cur_frame != skip_frame) begin
        check($signed(mfcc_tdata) > cur - tol && $signed(mfcc_tdata) < cur + tol,
              $sformatf("MFCC frame %0d C[%0d] = %0d, reference %f, tolerance %f", n_mfcc_frames, ncoef,
                        $signed(mfcc_tdata), cur, tol));
        n_mfcc_checked++;
      end
      check(mfcc_tlast == (ncoef == NCEPS - 1), "MFCC tlast on C[9]");
      n_mfcc_words++;
      ncoef++;
      if (ncoef == NCEPS) begin ncoef = 0; n_mfcc_frames++; end
    end
  end

  // ------------------------------------------------------------- stimulus
  initial begin
    realtime t0, t1, t2;
    int bits;
    repeat (5) @(posedge aclk);
    aresetn = 1;
    // PDM clock
    @(posedge pdm_clock); t0 = $realtime;
    @(negedge pdm_clock); t1 = $realtime;
    @(posedge pdm_clock); t2 = $realtime;
    check(t2 - t0 == CLK_DIV * 10.0, $sformatf("PDM clock period %0t", t2 - t0));
    check(t1 - t0 == CLK_DIV * 5.0, $sformatf("PDM clock high time %0t", t1 - t0));
    check(!recording && n_mic_bits == 0, "idle before start_recording");
    // record
    @(negedge aclk) start_recording = 1;
    repeat (4) @(posedge aclk);
    check(recording, "recording after start_recording");
    // coefficient reload while streaming
    wait (n_mfcc_frames == RELOAD_AFTER);
    @(negedge aclk);
    for (int k = 0; k < TAPS; k++) begin
      r_tdata = 16'(h_new[k]); r_tvalid = 1; r_tlast = (k == TAPS - 1);
      @(negedge aclk);
    end
    r_tvalid = 0; r_tlast = 0;
    // the reload went to the idle bank; switch to it a while later
    repeat (600000) @(negedge aclk);       // more than one frame
    c_tdata = 8'd1; c_tvalid = 1;
    @(negedge aclk);
    c_tvalid = 0;
    // one frame with the consumer not ready
    wait (n_mfcc_frames == DROP_FRAME);
    @(negedge aclk) mfcc_tready = 0;
    wait (n_mfcc_frames == DROP_FRAME + 1);
    @(negedge aclk) mfcc_tready = 1;
    // stop: recording ends at the next microphone frame end
    wait (n_mfcc_frames == NFRAMES);
    @(negedge aclk) start_recording = 0;
    wait (!recording);
    bits = n_mic_bits;
    check(bits % (FRAME_WORDS * 8) == 0,
          $sformatf("recording stopped on a microphone frame boundary (%0d bits)", bits));
    // the partial PCM block left in the filter never comes out; wait long
    // enough for any further (wrong) MFCC word to show
    repeat (8 * M * CLK_DIV) @(posedge aclk);
    // mechanism summary
    check(n_rec_start == 1 && n_rec_stop == 1, "one recording start and stop");
    check(n_reload_words == TAPS && r_tready, "coefficient reload accepted");
    check(n_bank_switch == 1 && c_tready, "coefficient bank switch accepted");
    check(skip_frame >= RELOAD_AFTER + 1 && skip_frame <= RELOAD_AFTER + 2, "bank switch landed in the expected frame");
    check(n_mfcc_frames == npcm / N && n_mfcc_words == NCEPS * n_mfcc_frames,
          $sformatf("%0d MFCC frames for %0d PCM samples", n_mfcc_frames, npcm));
    check(n_mfcc_checked >= NCEPS * (n_mfcc_frames - 1), "MFCC words checked");
    check(n_dropped == NCEPS, $sformatf("%0d dropped MFCC words, expected %0d", n_dropped, NCEPS));
    check(n_overrun == 0, "no microphone overrun");
    $display("mechanisms: recording start %0d stop %0d, PDM bits %0d (%0d microphone frames), PCM samples %0d,",
             n_rec_start, n_rec_stop, n_mic_bits, n_mic_bits / (FRAME_WORDS * 8), npcm);
    $display("  coefficient reload words %0d, bank switches %0d (MFCC frame %0d straddles it, not compared),",
             n_reload_words, n_bank_switch, skip_frame);
    $display("  MFCC frames %0d, MFCC words %0d (compared %0d), dropped MFCC words %0d, microphone overruns %0d",
             n_mfcc_frames, n_mfcc_words, n_mfcc_checked, n_dropped, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
