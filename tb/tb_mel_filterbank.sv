// tb_mel_filterbank -- self-checking testbench of mel_filterbank (N = 256,
// 48 kHz, 32 filters).
//
// Frames of 129 bins with random complex values (one frame of small values,
// one of full 24-bit values, one with a single non-zero bin per filter
// region) are sent, and the 32 energies are compared with the triangular
// filter bank built here from the Mel formula with the usual rising/falling
// loops (tb_mfcc_ref_pkg::mel_of_power) on the exact power re^2 + im^2.
// The allowed error per filter is the Q0.8 weight rounding, 1/512 of the
// power that falls into the filter, plus 1.  Also checked: indices 0..31,
// m_last on 31, s_ready low while the energies are sent, and that the
// accumulators start from zero for every frame.
module tb_mel_filterbank;
  import tb_mfcc_ref_pkg::*;
  localparam int DW = 24;
  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] s_re = 0, s_im = 0;
  logic [7:0] s_idx = 0;
  logic s_valid = 0, s_ready, s_last = 0;
  logic [63:0] m_data;
  logic [4:0]  m_idx;
  logic m_valid, m_ready = 1, m_last;
  int checks = 0, failures = 0;

  mel_filterbank #(.N(256), .FS(48000), .NMEL(32), .DW(DW), .EW(64)) dut (.clk, .rst_n, .s_re, .s_im, .s_idx,
      .s_valid, .s_ready, .s_last, .m_data, .m_idx, .m_valid, .m_ready, .m_last);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  pow_t p;
  mel_t e_ref;
  int   nout = 0, frames = 0;
  int   edg [NMEL + 2];

  function automatic real u64_to_real(input logic [63:0] v);
    return real'(v[63:32]) * 4294967296.0 + real'(v[31:0]);
  endfunction

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    real tol;
    tol = 1.0;
    for (int k = edg[nout]; k < edg[nout + 2] && k < NB; k++) tol += p[k] / 512.0;
    check(u64_to_real(m_data) >= e_ref[nout] - tol && u64_to_real(m_data) <= e_ref[nout] + tol,
          $sformatf("frame %0d E[%0d] = %0d ref %f tol %f", frames, nout, m_data, e_ref[nout], tol));
    check(m_idx == 5'(nout), "energy index");
    check(m_last == (nout == NMEL - 1), "m_last on last filter");
    check(!s_ready, "no bins taken while energies are sent");
    nout++;
    if (m_last) begin nout = 0; frames++; end
  end

  task automatic send_frame(input int kind);
    for (int k = 0; k < NB; k++) begin
      int re, im;
      case (kind)
        0: begin re = int'($urandom_range(2000)) - 1000; im = int'($urandom_range(2000)) - 1000; end
        1: begin re = int'($urandom_range(16777215)) - 8388608; im = int'($urandom_range(16777215)) - 8388608; end
        default: begin re = (k % 5 == 2) ? 100000 : 0; im = (k % 7 == 3) ? -50000 : 0; end
      endcase
      p[k] = real'(re) * re + real'(im) * im;
      @(negedge clk);
      while (!s_ready) @(negedge clk);
      s_re = DW'(re); s_im = DW'(im); s_idx = 8'(k); s_last = (k == NB - 1);
      s_valid = ($urandom_range(3) != 0);
      while (!s_valid) begin @(negedge clk); s_valid = ($urandom_range(3) != 0); end
      @(negedge clk);
      s_valid = 0; s_last = 0;
    end
    e_ref = mel_of_power(p);
  endtask

  always @(negedge clk) m_ready = ($urandom_range(3) != 0);

  initial begin
    mel_edges(edg);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      send_frame(f);
      wait (frames == f + 1);
    end
    check(checks >= 3 * 32 * 4, "all energies checked");
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
