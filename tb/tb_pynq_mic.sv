// tb_pynq_mic -- self-checking testbench of pynq_mic.
//
// A random PDM bit stream is driven like a microphone would (new bit after
// each falling edge of pdm_clock) and every bit present at a rising edge while
// recording is kept in a queue.  Checks:
//   * pdm_clock period and duty cycle (CLK_DIV aclk cycles, half high);
//   * each AXI-Stream beat holds the next TDATA_W sampled bits, bit 0 first;
//   * tlast on every FRAME_WORDS-th beat and on no other;
//   * beat spacing of TDATA_W * CLK_DIV cycles;
//   * after start_recording falls mid-frame the frame is completed and then
//     no more beats come;
//   * a beat not taken before the next one is overwritten and flags overrun.
module tb_pynq_mic;
  localparam int CLK_DIV = 8, TDATA_W = 8, FRAME_WORDS = 4;

  logic aclk = 0, aresetn = 0;
  logic pdm_clock, pdm_data = 0, start_recording = 0, recording;
  logic [TDATA_W-1:0] tdata;
  logic tvalid, tready = 1, tlast, overrun;
  int checks = 0, failures = 0;

  pynq_mic #(.CLK_DIV(CLK_DIV), .TDATA_W(TDATA_W), .FRAME_WORDS(FRAME_WORDS)) dut (
    .aclk, .aresetn, .pdm_clock, .pdm_data, .start_recording, .recording,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready),
    .m_axis_tlast(tlast), .overrun);

  always #5 aclk = ~aclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // microphone: new random bit shortly after each falling edge
  always @(negedge pdm_clock) #2 pdm_data = $urandom_range(1);

  // bits seen at rising edges while the testbench considers recording active
  bit sampled[$];
  bit tb_rec = 0;
  always @(posedge pdm_clock) if (tb_rec) sampled.push_back(pdm_data);

  // beats
  int beats = 0, taken = 0, overruns = 0;
  longint cyc = 0, last_beat_cyc = -1;
  always @(posedge aclk) cyc++;

  logic tvalid_q = 0;
  bit spacing_on = 1;
  always @(posedge aclk) begin
    if (overrun) overruns++;
    if (tvalid && tready) begin
      logic [TDATA_W-1:0] exp_d;
      for (int b = 0; b < TDATA_W; b++) exp_d[b] = sampled.size() > 0 ? sampled.pop_front() : 1'b0;
      check(tdata == exp_d, $sformatf("beat %0d data %h expected %h", taken, tdata, exp_d));
      check(tlast == ((taken % FRAME_WORDS) == FRAME_WORDS - 1),
            $sformatf("beat %0d tlast %0b", taken, tlast));
      taken++;
    end
  end

  // new beat = rising tvalid or new data while tvalid (count cycle spacing)
  always @(posedge aclk) begin
    if (tvalid && !tvalid_q) begin
      if (last_beat_cyc >= 0 && spacing_on)
        check(cyc - last_beat_cyc == TDATA_W * CLK_DIV,
              $sformatf("beat spacing %0d", cyc - last_beat_cyc));
      last_beat_cyc = cyc;
      beats++;
    end
    tvalid_q <= tvalid;
  end

  // pdm_clock shape
  longint rise_t = -1, fall_t = -1;
  int clk_checks = 0;
  always @(posedge pdm_clock) begin
    if (rise_t >= 0 && clk_checks < 20) begin
      check(cyc - rise_t == CLK_DIV, "pdm_clock period");
      clk_checks++;
    end
    rise_t = cyc;
  end
  always @(negedge pdm_clock) if (rise_t >= 0 && clk_checks < 20) check(cyc - rise_t == CLK_DIV / 2, "pdm_clock high time");

  initial begin
    repeat (5) @(posedge aclk);
    aresetn = 1;
    // start right after a falling edge so the first sampled edge is unambiguous
    @(negedge pdm_clock); @(posedge aclk);
    start_recording = 1; tb_rec = 1;
    // two frames with recording kept high
    wait (taken == 2 * FRAME_WORDS - 1);
    // drop start_recording in the middle of the third frame
    wait (taken == 2 * FRAME_WORDS + 1);
    @(posedge aclk) start_recording = 0;
    wait (!recording);
    @(posedge pdm_clock);
    tb_rec = 0;
    repeat (TDATA_W * CLK_DIV * 6) @(posedge aclk);
    check(taken == 3 * FRAME_WORDS, $sformatf("beats after stop: %0d", taken));
    check(!tvalid, "no beat pending after stop");

    // overrun: restart with the consumer stalled for two beat times
    sampled.delete();
    spacing_on = 0;
    @(negedge pdm_clock); @(posedge aclk);
    start_recording = 1; tb_rec = 1; tready = 0;
    wait (tvalid);
    repeat (TDATA_W * CLK_DIV + 4) @(posedge aclk);
    check(overruns == 1, $sformatf("overrun count %0d", overruns));
    // the pending beat is now the second one: drop the first beat's bits
    repeat (TDATA_W) void'(sampled.pop_front());
    taken = 1;                     // count within the new recording
    @(negedge aclk) tready = 1;
    repeat (TDATA_W * CLK_DIV * 2) @(posedge aclk);
    check(taken >= 2, "beats resume after overrun");
    start_recording = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
