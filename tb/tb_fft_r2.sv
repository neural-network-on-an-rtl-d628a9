// tb_fft_r2 -- self-checking testbench of fft_r2 (N = 256).
//
// Frames: full-scale random noise, a pure tone on bin 13, an impulse, a
// constant, and a tone between bins plus noise.  For every output bin k the
// expected value is the DFT computed here directly in real arithmetic,
// scaled by the core's 2^6/256:
//     X[k] = 0.25 * sum_n x[n] * exp(-j 2 pi n k / 256).
// The allowed error is 8 LSB plus 2^-12 of the largest possible magnitude
// (0.25 * sum |x|), which covers the truncation of each butterfly and the
// Q1.14 twiddles.  Also checked: bins arrive in order 0..128 with m_last on
// 128, s_ready is low from the end of loading until the spectrum has been
// read, and the first bin is valid 1024 + 1 cycles after the last sample
// was taken (8 stages x 128 butterflies).
module tb_fft_r2;
  localparam int N = 256, IN_W = 17, DW = 24;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  logic signed [IN_W-1:0] s_data = 0;
  logic s_valid = 0, s_ready;
  logic signed [DW-1:0] m_re, m_im;
  logic [7:0] m_idx;
  logic m_valid, m_ready = 1, m_last, calc_busy;
  int checks = 0, failures = 0;

  fft_r2 #(.N(N), .IN_W(IN_W), .DW(DW)) dut (.clk, .rst_n, .s_data, .s_valid, .s_ready,
      .m_re, .m_im, .m_idx, .m_valid, .m_ready, .m_last, .calc_busy);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int  x_in [$];
  int  x_ref [N];
  int  nbin = 0, frames_out = 0, max_err = 0;
  longint cyc = 0, last_in_cyc = 0;
  bit  first_bin = 1;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && s_valid && s_ready) begin
      x_in.push_back(int'(s_data));
      if (x_in.size() == N) begin
        foreach (x_ref[n]) x_ref[n] = x_in[n];
        x_in.delete();
        last_in_cyc = cyc;
        first_bin = 1;
      end
    end
    if (rst_n && m_valid) begin
      if (first_bin) begin
        check(cyc - last_in_cyc == N / 2 * 8 + 1, $sformatf("first bin after %0d cycles", cyc - last_in_cyc));
        first_bin = 0;
      end
      check(!s_ready, "no input taken while the spectrum is read");
    end
    if (rst_n && m_valid && m_ready) begin
      real re, im, bound, tol;
      re = 0.0; im = 0.0; bound = 0.0;
      for (int n = 0; n < N; n++) begin
        re += x_ref[n] * $cos(2.0 * PI * n * nbin / N);
        im -= x_ref[n] * $sin(2.0 * PI * n * nbin / N);
        bound += (x_ref[n] < 0 ? -x_ref[n] : x_ref[n]);
      end
      re *= 0.25; im *= 0.25; bound *= 0.25;
      tol = 8.0 + bound / 4096.0;
      check(real'(m_re) > re - tol && real'(m_re) < re + tol && real'(m_im) > im - tol && real'(m_im) < im + tol,
            $sformatf("frame %0d bin %0d = (%0d, %0d) ref (%f, %f) tol %f", frames_out, nbin, m_re, m_im, re, im, tol));
      check(m_idx == 8'(nbin), "bin index");
      check(m_last == (nbin == N / 2), "m_last on bin N/2");
      nbin++;
      if (m_last) begin nbin = 0; frames_out++; end
    end
  end

  task automatic send_frame(input int kind);
    for (int n = 0; n < N; n++) begin
      int v;
      case (kind)
        0: v = int'($urandom_range(131071)) - 65536;
        1: v = $rtoi(60000.0 * $cos(2.0 * PI * 13 * n / N));
        2: v = (n == 5) ? 65535 : 0;
        3: v = -40000;
        default: v = $rtoi(30000.0 * $sin(2.0 * PI * 40.3 * n / N)) + int'($urandom_range(2000)) - 1000;
      endcase
      @(negedge clk);
      while (!s_ready) @(negedge clk);
      s_data = IN_W'(v); s_valid = 1;
      @(negedge clk);
      s_valid = 0;
    end
  endtask

  always @(negedge clk) m_ready = ($urandom_range(4) != 0);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 5; f++) send_frame(f);
    wait (frames_out == 5);
    check(checks > 5 * 129 * 3, "all bins checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
