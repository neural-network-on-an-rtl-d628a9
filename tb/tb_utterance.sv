// tb_utterance -- one full utterance through the front end at its default
// parameters: the 1,990 MFCC values (199 frames of 10) that form one input
// vector of the speech-command network.
//
// The microphone model plays two tones (440 Hz and 2.5 kHz) plus noise.
// start_recording is held until the recording has entered its last
// microphone frame, so that exactly 199 * 256 PCM samples are made; the
// testbench then expects exactly 1,990 MFCC words, with tlast on every 10th,
// and compares every one with the floating-point model (tb_mfcc_ref_pkg) of
// the PCM samples, which it computes itself from the PDM bits on pdm_data
// (taken two aclk cycles before the first cycle of each pdm_clock high phase)
// and the reset filter coefficients.  The consumer is always ready, so no
// word may be dropped and the microphone must never overrun.  About 104
// million clock cycles (1.04 s of audio) are simulated.
module tb_utterance;
  import tb_mfcc_ref_pkg::*;
  localparam int CLK_DIV = 32, FRAME_WORDS = 256, M = 64, TAPS = 128;
  localparam int NFRAMES = 199;
  localparam int NBITS = NFRAMES * N * M;            // PDM bits of the utterance

  logic aclk = 0, aresetn = 0;
  logic pdm_clock, pdm_data, start_recording = 0, recording;
  logic r_tready;
  logic [31:0] mfcc_tdata;
  logic mfcc_tvalid, mfcc_tlast;
  logic mic_overrun, mfcc_dropped;
  int checks = 0, failures = 0;

  speech_frontend_top dut (
    .aclk, .aresetn, .pdm_clock, .pdm_data, .start_recording, .recording,
    .s_axis_config_tdata(8'd0), .s_axis_config_tvalid(1'b0), .s_axis_config_tready(),
    .s_axis_reload_tdata(16'sd0), .s_axis_reload_tvalid(1'b0), .s_axis_reload_tready(r_tready),
    .s_axis_reload_tlast(1'b0),
    .m_axis_mfcc_tdata(mfcc_tdata), .m_axis_mfcc_tvalid(mfcc_tvalid), .m_axis_mfcc_tready(1'b1),
    .m_axis_mfcc_tlast(mfcc_tlast), .mic_overrun, .mfcc_dropped);

  pdm_mic_model #(.F1(440.0), .AMP1(0.35), .F2(2500.0), .AMP2(0.25), .NOISE(0.1)) mic (.pdm_clock, .pdm_data);

  always #5 aclk = ~aclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int h [TAPS];
  initial
    for (int k = 0; k < TAPS; k++) begin
      int t;
      t = (k + 1 < 2 * M - 1 - k) ? k + 1 : 2 * M - 1 - k;
      h[k] = t * (32768 / (M * M));
    end

  // The bits are kept only as long as a PCM sample still needs them.
  bit  win [TAPS];             // the last 128 bits, win[0] the newest
  int  nbits = 0, npcm = 0, nwords = 0, ncoef = 0, nframes_out = 0, n_dropped = 0, n_overrun = 0;
  logic pclk_q = 0, d1 = 0, d2 = 0;
  real pcm [$], ref_q [$], tol_q [$];
  real prev = 0.0, cur, tol, err_max = 0.0;
  ceps_t c, t;

  always @(posedge aclk) if (aresetn) begin
    if (recording && pdm_clock && !pclk_q) begin
      for (int k = TAPS - 1; k > 0; k--) win[k] = win[k - 1];
      win[0] = d2;
      nbits++;
      if (nbits % M == 0) begin
        longint acc;
        acc = 0;
        // sample npcm uses bits 64*npcm + 63 - k; the newest bit is 64*npcm + 63
        for (int k = 0; k < TAPS; k++)
          if (nbits - 1 - k >= 0) acc += (win[k] ? 1 : -1) * h[k];
        if (acc > 32767) acc = 32767;
        if (acc < -32768) acc = -32768;
        pcm.push_back(real'(acc));
        npcm++;
        if (pcm.size() == N) begin
          frame_t f;
          foreach (f[n]) f[n] = pcm[n];
          c = mfcc_ref(f, prev);
          t = mfcc_tol(f, prev);
          foreach (c[k]) begin ref_q.push_back(c[k]); tol_q.push_back(t[k]); end
          prev = pcm[N - 1];
          pcm.delete();
        end
      end
    end
    pclk_q <= pdm_clock;
    d1 <= pdm_data;
    d2 <= d1;
    if (mic_overrun) n_overrun++;
    if (mfcc_dropped) n_dropped++;
    if (mfcc_tvalid) begin
      cur = (ref_q.size() > 0) ? ref_q.pop_front() : 0.0;
      tol = (tol_q.size() > 0) ? tol_q.pop_front() : 0.0;
      check($signed(mfcc_tdata) > cur - tol && $signed(mfcc_tdata) < cur + tol,
            $sformatf("frame %0d C[%0d] = %0d, reference %f, tolerance %f", nframes_out, ncoef,
                      $signed(mfcc_tdata), cur, tol));
      if ($signed(mfcc_tdata) - cur > err_max) err_max = $signed(mfcc_tdata) - cur;
      if (cur - $signed(mfcc_tdata) > err_max) err_max = cur - $signed(mfcc_tdata);
      check(mfcc_tlast == (ncoef == NCEPS - 1), "tlast on C[9]");
      nwords++;
      ncoef++;
      if (ncoef == NCEPS) begin ncoef = 0; nframes_out++; end
    end
  end

  initial begin
    repeat (5) @(posedge aclk);
    aresetn = 1;
    repeat (10) @(posedge aclk);
    @(negedge aclk) start_recording = 1;
    // release once the last microphone frame (FRAME_WORDS * 8 bits) has begun
    wait (nbits > NBITS - FRAME_WORDS * 8);
    @(negedge aclk) start_recording = 0;
    wait (!recording);
    repeat (4 * M * CLK_DIV) @(posedge aclk);    // let the last frame through the core
    check(nbits == NBITS, $sformatf("%0d PDM bits recorded, expected %0d", nbits, NBITS));
    check(npcm == NFRAMES * N, $sformatf("%0d PCM samples, expected %0d", npcm, NFRAMES * N));
    check(nwords == NFRAMES * NCEPS, $sformatf("%0d MFCC words, expected %0d", nwords, NFRAMES * NCEPS));
    check(n_dropped == 0 && n_overrun == 0, "nothing dropped, no overrun");
    $display("utterance: %0d PDM bits, %0d PCM samples, %0d MFCC frames, %0d MFCC words; largest MFCC error %0.1f",
             nbits, npcm, nframes_out, nwords, err_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (110_000_000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
