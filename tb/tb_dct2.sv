// tb_dct2 -- self-checking testbench of dct2 (32 inputs, 10 outputs).
//
// Frames of 32 random log energies (0 .. 65535, in random order by index)
// are sent.  Each output C[n] is compared with
//     sum_i Lg[i] * cos(pi * n * (i + 0.5) / 32)
// computed here in real arithmetic; the allowed error is the Q1.14 rounding
// of the cosines (sum_i Lg[i] / 2^15) plus one LSB of truncation.  Checked as
// well: tlast on C[9] only, exactly one cycle of tvalid per coefficient,
// C[0] appearing 33 cycles after the last input is taken and the following ones
// every 32 cycles, s_ready low while computing, and `dropped` pulsing for
// a word presented while tready is low.
module tb_dct2;
  localparam int NMEL = 32, NCEPS = 10;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  logic [15:0] s_data = 0;
  logic [4:0]  s_idx = 0;
  logic s_valid = 0, s_ready, s_last = 0;
  logic [31:0] m_tdata;
  logic m_tvalid, m_tready = 1, m_tlast, dropped;
  int checks = 0, failures = 0;

  dct2 #(.NMEL(NMEL), .NCEPS(NCEPS), .IN_W(16), .OUT_W(32)) dut (.clk, .rst_n, .s_data, .s_idx, .s_valid,
      .s_ready, .s_last, .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
      .m_axis_tlast(m_tlast), .dropped);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int lg [NMEL];       // values being sent
  int lg_in [NMEL];    // values taken by the DUT
  int lg_ref [NMEL];   // complete frame under computation
  int ncoef = 0, ndropped = 0;
  longint cyc = 0, last_in_cyc = 0, prev_out_cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && dropped) ndropped++;
    if (rst_n && s_valid && s_ready) begin
      lg_in[s_idx] = int'(s_data);
      if (s_last) begin
        lg_ref = lg_in;
        last_in_cyc = cyc;
      end
    end
    if (rst_n && m_tvalid) begin
      real r, tol;
      r = 0.0; tol = 1.0;
      for (int i = 0; i < NMEL; i++) begin
        r   += lg_ref[i] * $cos(PI * ncoef * (i + 0.5) / NMEL);
        tol += lg_ref[i] / 32768.0;
      end
      check($signed(m_tdata) <= r + tol && $signed(m_tdata) >= r - tol,
            $sformatf("C[%0d]=%0d ref %f", ncoef, $signed(m_tdata), r));
      check(m_tlast == (ncoef == NCEPS - 1), "tlast on last coefficient");
      if (ncoef == 0) check(cyc - last_in_cyc == NMEL + 1, $sformatf("C[0] after %0d cycles", cyc - last_in_cyc));
      else            check(cyc - prev_out_cyc == NMEL, $sformatf("coefficient spacing %0d", cyc - prev_out_cyc));
      if (ncoef != NCEPS - 1) check(!s_ready, "not ready while computing");
      prev_out_cyc = cyc;
      ncoef = (ncoef + 1) % NCEPS;
    end
  end

  // the coefficient word is presented for exactly one cycle
  logic tvalid_q = 0;
  always @(posedge clk) begin
    if (tvalid_q && m_tvalid) check(0, "tvalid longer than one cycle");
    tvalid_q <= m_tvalid;
  end

  task automatic send_frame(input bit full_scale);
    int order [NMEL];
    for (int i = 0; i < NMEL; i++) order[i] = i;
    order.shuffle();
    for (int i = 0; i < NMEL; i++) begin
      @(negedge clk);
      while (!s_ready) @(negedge clk);
      lg[order[i]] = full_scale ? 65535 : int'($urandom_range(65535));
      s_data = 16'(lg[order[i]]); s_idx = 5'(order[i]); s_valid = 1; s_last = (i == NMEL - 1);
    end
    @(negedge clk);
    s_valid = 0; s_last = 0;
    wait (s_ready);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) send_frame(f == 0);
    // consumer not ready: every word of this frame is dropped
    repeat (3) @(negedge clk);
    m_tready = 0;
    send_frame(0);
    repeat (4) @(posedge clk);
    check(ndropped == NCEPS, $sformatf("dropped %0d words", ndropped));
    check(checks > 20 * NCEPS * 4, "enough checks");
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
