// tb_fir_decimator -- self-checking testbench of fir_decimator.
//
// Random PDM beats are fed in; every PCM output is compared with a direct
// convolution computed here,
//     y[b] = sat( sum_k h[k] * x[b*M + M-1 - k] ),  x = +1/-1, x[<0] = 0,
// with the reset coefficients re-derived in the testbench (triangle of two
// length-M boxcars scaled to full scale).  Phase 1 uses those coefficients
// with a randomly stalling consumer and random input gaps, and checks the
// tlast mapping (tlast on the PCM sample whose block holds the last bit of a
// tlast beat) and the AXI hold rule.  Phase 2 checks the throughput: one
// PCM sample every M/TDATA_W * (TDATA_W+1) cycles with no stalls.  Phase 3
// resets the core, loads random coefficients through the reload channel
// (into the idle bank), selects that bank with a config beat and checks the
// outputs against them.  Phase 4 selects the reset bank again while data
// flows: outputs computed wholly before the switch must use the random set,
// those wholly after it the reset set; the one or two that straddle the
// switch are not compared.
module tb_fir_decimator;
  localparam int TDATA_W = 8, M = 16, L = 2, COEF_W = 16, PCM_W = 16;
  localparam int TAPS = L * M;

  logic aclk = 0, aresetn = 0;
  logic [TDATA_W-1:0] s_tdata = 0;
  logic s_tvalid = 0, s_tready, s_tlast = 0;
  logic signed [COEF_W-1:0] r_tdata = 0;
  logic [7:0] c_tdata = 0;
  logic c_tvalid = 0, c_tready;
  logic r_tvalid = 0, r_tready, r_tlast = 0;
  logic signed [PCM_W-1:0] m_tdata;
  logic m_tvalid, m_tready = 1, m_tlast;
  int checks = 0, failures = 0;

  fir_decimator #(.TDATA_W(TDATA_W), .M(M), .L(L), .COEF_W(COEF_W), .PCM_W(PCM_W)) dut (
    .aclk, .aresetn,
    .s_axis_data_tdata(s_tdata), .s_axis_data_tvalid(s_tvalid), .s_axis_data_tready(s_tready),
    .s_axis_data_tlast(s_tlast),
    .s_axis_config_tdata(c_tdata), .s_axis_config_tvalid(c_tvalid), .s_axis_config_tready(c_tready),
    .s_axis_reload_tdata(r_tdata), .s_axis_reload_tvalid(r_tvalid), .s_axis_reload_tready(r_tready),
    .s_axis_reload_tlast(r_tlast),
    .m_axis_data_tdata(m_tdata), .m_axis_data_tvalid(m_tvalid), .m_axis_data_tready(m_tready),
    .m_axis_data_tlast(m_tlast));

  always #5 aclk = ~aclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int h [TAPS], h_def [TAPS];
  int cfg_bit = -1, n_straddle = 0;
  int xs [$];          // +1 / -1 samples fed so far (this phase)
  bit last_bit [$];    // sample is the last bit of a tlast beat
  int nout = 0;
  bit stall_rand = 0;
  longint cyc = 0, first_out = -1, last_out = -1;

  function automatic int expect_y(input int b, input bit use_def = 0);
    longint s;
    int n;
    s = 0;
    for (int k = 0; k < TAPS; k++) begin
      n = b * M + M - 1 - k;
      if (n >= 0) s += longint'(use_def ? h_def[k] : h[k]) * xs[n];
    end
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return int'(s);
  endfunction

  function automatic bit expect_last(input int b);
    for (int n = b * M; n < b * M + M; n++) if (last_bit[n]) return 1;
    return 0;
  endfunction

  always @(posedge aclk) begin
    cyc++;
    if (aresetn && m_tvalid && m_tready) begin
      if (cfg_bit < 0 || nout * M + M - 1 < cfg_bit - 2 * TDATA_W)
        check(m_tdata == expect_y(nout), $sformatf("y[%0d]=%0d expected %0d", nout, m_tdata, expect_y(nout)));
      else if (nout * M - M >= cfg_bit + M + 2 * TDATA_W)
        check(m_tdata == expect_y(nout, 1), $sformatf("y[%0d]=%0d expected %0d (reset bank)", nout, m_tdata,
                                                      expect_y(nout, 1)));
      else n_straddle++;
      check(m_tlast == expect_last(nout), $sformatf("tlast of y[%0d]", nout));
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      nout++;
    end
  end

  always @(negedge aclk) if (stall_rand) m_tready = ($urandom_range(3) != 0);

  task automatic send_beats(input int nbeats, input bit gaps);
    for (int w = 0; w < nbeats; w++) begin
      logic [TDATA_W-1:0] d;
      bit lst;
      d   = TDATA_W'($urandom);
      lst = ($urandom_range(4) == 0);
      @(negedge aclk);
      while (gaps && $urandom_range(2) == 0) @(negedge aclk);
      s_tdata = d; s_tvalid = 1; s_tlast = lst;
      while (!s_tready) @(negedge aclk);
      @(negedge aclk);   // handshake took place at the posedge in between
      s_tvalid = 0;
      for (int b = 0; b < TDATA_W; b++) begin
        xs.push_back(d[b] ? 1 : -1);
        last_bit.push_back(lst && b == TDATA_W - 1);
      end
    end
  endtask

  task automatic do_reset();
    aresetn = 0;
    repeat (3) @(posedge aclk);
    xs.delete(); last_bit.delete(); nout = 0; first_out = -1;
    aresetn = 1;
    @(posedge aclk);
  endtask

  initial begin
    // reference reset coefficients
    for (int k = 0; k < TAPS; k++) begin
      int t;
      t = (k < M) ? k + 1 : 2 * M - 1 - k;
      if (k == TAPS - 1) t = 0;
      h[k] = t * (32768 / (M * M));
      h_def[k] = h[k];
    end
    do_reset();

    // phase 1: default coefficients, random stalls and gaps
    stall_rand = 1;
    send_beats(200, 1);
    repeat (400) @(posedge aclk);
    stall_rand = 0; m_tready = 1;
    repeat (50) @(posedge aclk);
    check(nout == 200 * TDATA_W / M, $sformatf("phase 1 outputs %0d", nout));

    // phase 2: throughput
    do_reset();
    send_beats(64, 0);
    repeat (50) @(posedge aclk);
    check(nout == 64 * TDATA_W / M, $sformatf("phase 2 outputs %0d", nout));
    check(last_out - first_out == longint'(nout - 1) * (M / TDATA_W) * (TDATA_W + 1),
          $sformatf("throughput: %0d cycles for %0d outputs", last_out - first_out, nout));

    // phase 3: reload random coefficients, tlast at the end
    do_reset();
    for (int k = 0; k < TAPS; k++) begin
      h[k] = $urandom_range(1000) - 500;
      @(negedge aclk);
      r_tdata = COEF_W'(h[k]); r_tvalid = 1; r_tlast = (k == TAPS - 1);
      check(r_tready, "reload ready");
    end
    @(negedge aclk);
    r_tvalid = 0; r_tlast = 0;
    c_tdata = 8'd1; c_tvalid = 1;           // use the bank just loaded
    check(c_tready, "config ready");
    @(negedge aclk);
    c_tvalid = 0;
    stall_rand = 1;
    send_beats(120, 1);
    repeat (400) @(posedge aclk);
    stall_rand = 0; m_tready = 1;
    repeat (50) @(posedge aclk);
    check(nout == 120 * TDATA_W / M, $sformatf("phase 3 outputs %0d", nout));

    // phase 4: back to the reset bank in the middle of the stream
    fork
      send_beats(120, 1);
      begin
        wait (xs.size() >= 960 + 40 * TDATA_W + 3);
        @(negedge aclk);
        c_tdata = 8'd0; c_tvalid = 1;
        cfg_bit = xs.size();
        @(negedge aclk);
        c_tvalid = 0;
      end
    join
    repeat (50) @(posedge aclk);
    check(nout == 240 * TDATA_W / M, $sformatf("phase 4 outputs %0d", nout));
    check(n_straddle >= 1 && n_straddle <= 4, $sformatf("%0d outputs straddle the bank switch", n_straddle));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
