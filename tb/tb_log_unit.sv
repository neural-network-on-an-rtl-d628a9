// tb_log_unit -- self-checking testbench of log_unit.
//
// Inputs cover zero, exact powers of two, and random values of every
// magnitude from 1 to 2^63.  The output must approximate 256 * log10(x)
// (computed here with $log10) to within the Mitchell approximation error
// of 0.0861 * log10(2) * 256 = 6.6 LSB plus truncation; exact powers of two
// must be within 1.1 LSB (truncation plus the Q0.16 log10(2) constant); zero must give zero.  The one-cycle latency and the
// index / last side-band are also checked, with a stalling consumer.
module tb_log_unit;
  logic clk = 0, rst_n = 0;
  logic [63:0] s_data = 0;
  logic [4:0]  s_idx = 0, m_idx;
  logic s_valid = 0, s_ready, s_last = 0;
  logic [15:0] m_data;
  logic m_valid, m_ready = 1, m_last;
  int checks = 0, failures = 0;

  log_unit #(.IN_W(64), .OUT_W(16), .FRAC(8), .IDX_W(5)) dut (.clk, .rst_n, .s_data, .s_idx, .s_valid,
      .s_ready, .s_last, .m_data, .m_idx, .m_valid, .m_ready, .m_last);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { logic [63:0] x; logic [4:0] idx; bit last; } item_t;
  item_t q [$];
  int nout = 0;

  function automatic real log10_of(input logic [63:0] x);
    real r;
    r = real'(x[63:32]) * 4294967296.0 + real'(x[31:0]);
    return $log10(r);
  endfunction

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    item_t it;
    real   r;
    bit    pow2;
    it = q.pop_front();
    pow2 = (it.x != 0) && ((it.x & (it.x - 1)) == 0);
    if (it.x == 0) check(m_data == 0, "log of 0 gives 0");
    else begin
      r = 256.0 * log10_of(it.x);
      if (pow2) check(real'(m_data) <= r + 0.01 && real'(m_data) > r - 1.1,
                      $sformatf("log(2^k) of %h = %0d ref %f", it.x, m_data, r));
      else      check(real'(m_data) <= r + 0.01 && real'(m_data) > r - 8.0,
                      $sformatf("log of %h = %0d ref %f", it.x, m_data, r));
    end
    check(m_idx == it.idx && m_last == it.last, "side-band");
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    s_data = 64'd1000; s_valid = 1; s_idx = 5'd3; q.push_back('{64'd1000, 5'd3, 1'b0});
    @(negedge clk);
    s_valid = 0;
    check(m_valid && m_idx == 5'd3, "one-cycle latency");
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] x;
      int e;
      e = $urandom_range(63);
      if (i % 50 == 0)      x = 0;
      else if (i % 7 == 0)  x = 64'd1 << e;
      else                  x = ({$urandom, $urandom} >> (63 - e)) | (64'd1 << e);
      s_data = x; s_idx = 5'($urandom); s_last = ($urandom_range(31) == 0);
      s_valid = ($urandom_range(3) != 0); m_ready = ($urandom_range(3) != 0);
      #1;
      if (s_valid && s_ready) q.push_back('{x, s_idx, s_last});
      @(negedge clk);
    end
    s_valid = 0; m_ready = 1;
    repeat (5) @(negedge clk);
    check(q.size() == 0 && nout > 1000, "all inputs came out");
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
