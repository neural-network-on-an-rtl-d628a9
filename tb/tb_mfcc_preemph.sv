// tb_mfcc_preemph -- self-checking testbench of mfcc_preemph.
//
// Random 16-bit samples (including full-scale extremes) go through the
// filter with random input gaps and a randomly stalling consumer.  Every
// output is compared with y = x[n] - 0.96875 * x[n-1] computed in real
// arithmetic; the hardware rounds the alpha term towards minus infinity, so
// it must lie within [ref, ref + 1).  Also checked: one-cycle latency and
// that the output holds while stalled.
module tb_mfcc_preemph;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] s_data = 0;
  logic s_valid = 0, s_ready, s_last = 0;
  logic signed [16:0] m_data;
  logic m_valid, m_ready = 1, m_last;
  int checks = 0, failures = 0;

  mfcc_preemph #(.IN_W(16), .OUT_W(17), .SHIFT(5)) dut (.clk, .rst_n, .s_data, .s_valid, .s_ready, .s_last,
                                                        .m_data, .m_valid, .m_ready, .m_last);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int   xin [$];
  bit   lin [$];
  int   nout = 0;
  real  prev = 0.0;

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    real r, x;
    x = real'(xin.pop_front());
    r = x - 0.96875 * prev;
    prev = x;
    check(real'(m_data) <= r && real'(m_data) > r - 1.0, $sformatf("y[%0d]=%0d ref %f", nout, m_data, r));
    check(m_last == lin.pop_front(), "last passes through");
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: a single sample appears one cycle after its handshake
    @(negedge clk);
    s_data = 16'sd1000; s_valid = 1; xin.push_back(1000); lin.push_back(0);
    @(negedge clk);
    s_valid = 0;
    check(m_valid && m_data == 17'sd1000, "one-cycle latency");
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      int v;
      v = (i % 97 == 0) ? 32767 : (i % 89 == 0) ? -32768 : int'($urandom_range(65535)) - 32768;
      s_data = 16'(v); s_valid = ($urandom_range(3) != 0); s_last = ($urandom_range(7) == 0);
      m_ready = ($urandom_range(3) != 0);
      #1;
      if (s_valid && s_ready) begin xin.push_back(v); lin.push_back(s_last); end
      @(negedge clk);
    end
    s_valid = 0; m_ready = 1;
    repeat (5) @(negedge clk);
    check(xin.size() == 0, "all samples came out");
    check(nout > 1000, "enough outputs");
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
