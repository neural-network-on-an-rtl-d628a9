// tb_mfcc_window -- self-checking testbench of mfcc_window.
//
// Uses a 16-sample frame.  Random 17-bit samples are sent with random gaps
// and a stalling consumer.  Each output must equal x * w(n) with
// w(n) = 0.54 - 0.46 cos(2 pi n / (N-1)) computed here in real arithmetic,
// within the table rounding (half an LSB) plus the truncation (one LSB); m_idx must count 0..N-1 and m_last must mark n = N-1.
module tb_mfcc_window;
  localparam int N = 16, W = 17;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] s_data = 0, m_data;
  logic s_valid = 0, s_ready, m_valid, m_ready = 1, m_last;
  logic [$clog2(N)-1:0] m_idx;
  int checks = 0, failures = 0;

  mfcc_window #(.N(N), .W(W)) dut (.clk, .rst_n, .s_data, .s_valid, .s_ready,
                                   .m_data, .m_idx, .m_valid, .m_ready, .m_last);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int xin [$];
  int nout = 0;

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    real r;
    int  n;
    n = nout % N;
    r = real'(xin.pop_front()) * (0.54 - 0.46 * $cos(2.0 * PI * n / (N - 1)));
    check(real'(m_data) <= r + 0.51 && real'(m_data) > r - 1.51, $sformatf("out %0d = %0d ref %f", nout, m_data, r));
    check(m_idx == n, $sformatf("idx %0d expected %0d", m_idx, n));
    check(m_last == (n == N - 1), "last marks end of frame");
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 1000; i++) begin
      int v;
      v = (i % 37 == 0) ? 65535 : (i % 41 == 0) ? -65536 : int'($urandom_range(131071)) - 65536;
      s_data = W'(v); s_valid = ($urandom_range(3) != 0); m_ready = ($urandom_range(3) != 0);
      #1;
      if (s_valid && s_ready) xin.push_back(v);
      @(negedge clk);
    end
    s_valid = 0; m_ready = 1;
    repeat (5) @(negedge clk);
    check(xin.size() == 0 && nout > 400, $sformatf("all %0d samples came out", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
