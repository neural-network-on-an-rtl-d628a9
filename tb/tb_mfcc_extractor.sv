// tb_mfcc_extractor -- self-checking testbench of the complete MFCC core.
//
// Five frames of 256 PCM samples (two tones plus noise, a different mix per
// frame) are streamed in with random gaps.  Each frame's 10 MFCCs are
// compared with tb_mfcc_ref_pkg::mfcc_ref, a floating-point evaluation of
// pre-emphasis, Hamming window, DFT, Mel bank, log10 and DCT-II, within the
// per-coefficient bound of tb_mfcc_ref_pkg::mfcc_tol.  Checked as well: 10
// words per frame with tlast on the last, the input being held off while
// the FFT computes, and the frame count.
module tb_mfcc_extractor;
  import tb_mfcc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] s_tdata = 0;
  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic [31:0] m_tdata;
  logic m_tvalid, m_tlast, dropped, fft_busy;
  int checks = 0, failures = 0;

  mfcc_extractor dut (.clk, .rst_n, .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready),
      .s_axis_tlast(s_tlast), .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(1'b1),
      .m_axis_tlast(m_tlast), .dropped, .fft_busy);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real   ref_q [$], tol_q [$];
  real   pcm [$];
  real   prev = 0.0;
  int    ncoef = 0, frames_out = 0, held_off = 0;
  real   cur, tol, tol_max = 0.0, err_max = 0.0;
  ceps_t c, t;

  always @(posedge clk) begin
    if (rst_n && s_tvalid && !s_tready && fft_busy) held_off++;
    if (rst_n && s_tvalid && s_tready) begin
      pcm.push_back(real'(s_tdata));
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
    if (rst_n && m_tvalid) begin
      cur = ref_q.pop_front();
      tol = tol_q.pop_front();
      if (tol > tol_max) tol_max = tol;
      if ($signed(m_tdata) - cur > err_max) err_max = $signed(m_tdata) - cur;
      if (cur - $signed(m_tdata) > err_max) err_max = cur - $signed(m_tdata);
      check($signed(m_tdata) > cur - tol && $signed(m_tdata) < cur + tol,
            $sformatf("frame %0d C[%0d] = %0d ref %f tol %f", frames_out, ncoef, $signed(m_tdata), cur, tol));
      check(m_tlast == (ncoef == NCEPS - 1), "tlast on C[9]");
      ncoef++;
      if (ncoef == NCEPS) begin ncoef = 0; frames_out++; end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 5; f++) begin
      for (int n = 0; n < N; n++) begin
        real t, v;
        t = real'(f * N + n) / FS;
        v = (6000.0 + 2000.0 * f) * $sin(2.0 * PI * (700.0 + 900.0 * f) * t)
          + 3000.0 * $sin(2.0 * PI * (9000.0 - 1000.0 * f) * t)
          + real'($urandom_range(4000)) - 2000.0;
        @(negedge clk);
        while ($urandom_range(2) == 0) @(negedge clk);
        s_tdata = 16'($rtoi(v)); s_tvalid = 1; s_tlast = (n == N - 1);
        #1;
        while (!s_tready) begin @(negedge clk); #1; end
        @(negedge clk);
        s_tvalid = 0; s_tlast = 0;
      end
    end
    wait (frames_out == 5);
    repeat (10) @(posedge clk);
    check(held_off > 0, "input held off while the FFT computes");
    check(!dropped, "nothing dropped with tready high");
    $display("largest MFCC error %0.1f, largest tolerance %0.1f", err_max, tol_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
