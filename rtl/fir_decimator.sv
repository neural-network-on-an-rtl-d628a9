// fir_decimator -- PDM-to-PCM converter: low-pass FIR filter and M-to-1
// decimation in one polyphase structure.
//
// Each 1-bit PDM sample x is taken as +1 (bit 1) or -1 (bit 0).  The filter
// has TAPS = L*M coefficients h[0..TAPS-1] and produces one output per M
// inputs:
//     y[b] = sum_{k=0}^{TAPS-1} h[k] * x[b*M + M-1 - k]
// (samples before the first one count as 0).  Only the outputs that survive
// decimation are computed.  Input sample b'*M + p contributes to the L
// outputs b'..b'+L-1 through the coefficients h[j*M + M-1-p], j = 0..L-1,
// which is the polyphase decomposition into M sub-filters of L taps each.
// L accumulators are kept; at the end of every block of M samples
// accumulator 0 holds a finished output, and the accumulators move down by
// one.  Every input sample costs one cycle (an add or a subtract per
// accumulator), so no multiplier is needed.
//
// Interfaces (AXI-Stream style, valid/ready):
//   s_axis_data    TDATA_W PDM bits per beat, bit 0 first.  tlast of a beat is
//                  passed to the next PCM output.
//   s_axis_config  one byte per beat; bit 0 selects which of the two
//                  coefficient banks filters.  The switch happens at the next
//                  block boundary (with L = 2 the first output after it is
//                  half old, half new).  Always ready.
//   s_axis_reload  coefficient reload: COEF_W-bit signed coefficients in the
//                  order h[0], h[1], ...; tlast returns the write pointer to
//                  h[0].  They are written into the bank the latest config
//                  beat did not select, so a new set is loaded while the
//                  other one filters and then switched to with one config
//                  beat.  Always ready.
//   m_axis_data    PCM_W-bit signed samples, saturated.
//
// The design description prescribes the function (low-pass filter followed
// by decimation to 48 kHz with factor 64, done by a polyphase decimating FIR
// with data, configuration and reload channels) but not the coefficients.
// The reset coefficients here are this implementation's choice: the
// triangular response of two cascaded length-M moving averages (h[k] =
// min(k+1, 2M-1-k), h[2M-1] = 0) scaled so that a constant all-ones input
// gives full-scale PCM; both banks start with it.  The two-bank scheme is
// this implementation's reading of "load and select" coefficient sets.
//
// Timing: one PDM bit per cycle; a beat is accepted one cycle after the
// previous beat's last bit, i.e. TDATA_W+1 cycles per beat.  A PCM sample is
// valid in the cycle after the last bit of its block.  If a new PCM sample is
// finished while the previous one is still not accepted, the filter stalls.
module fir_decimator #(
  parameter int unsigned TDATA_W = 8,    // PDM bits per input beat
  parameter int unsigned M       = 64,   // decimation factor
  parameter int unsigned L       = 2,    // taps per polyphase branch
  parameter int unsigned COEF_W  = 16,
  parameter int unsigned PCM_W   = 16,
  parameter int unsigned ACC_W   = 32
) (
  input  logic                     aclk,
  input  logic                     aresetn,
  // coefficient bank select
  input  logic [7:0]               s_axis_config_tdata,
  input  logic                     s_axis_config_tvalid,
  output logic                     s_axis_config_tready,
  // PDM input
  input  logic [TDATA_W-1:0]       s_axis_data_tdata,
  input  logic                     s_axis_data_tvalid,
  output logic                     s_axis_data_tready,
  input  logic                     s_axis_data_tlast,
  // coefficient reload
  input  logic signed [COEF_W-1:0] s_axis_reload_tdata,
  input  logic                     s_axis_reload_tvalid,
  output logic                     s_axis_reload_tready,
  input  logic                     s_axis_reload_tlast,
  // PCM output
  output logic signed [PCM_W-1:0]  m_axis_data_tdata,
  output logic                     m_axis_data_tvalid,
  input  logic                     m_axis_data_tready,
  output logic                     m_axis_data_tlast
);

  localparam int unsigned TAPS  = L * M;
  localparam int unsigned P_W   = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned BIT_W = (TDATA_W > 1) ? $clog2(TDATA_W) : 1;
  localparam int unsigned K_W   = (TAPS > 1) ? $clog2(TAPS) : 1;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Reset coefficient k: triangle of two length-M boxcars, gain-normalised.
  function automatic coef_t default_coef(input int unsigned k);
    int unsigned tri_v, scale;
    tri_v   = (k + 1 < 2 * M - 1 - k) ? k + 1 : ((2 * M - 1 > k) ? 2 * M - 1 - k : 0);
    scale = (1 << (PCM_W - 1)) / (M * M);
    if (scale == 0) scale = 1;
    return coef_t'(tri_v * scale);
  endfunction

  coef_t              h [2][TAPS];
  logic               act, req, pend, sw;   // bank in use, bank requested, switch pending
  acc_t               acc [L];
  acc_t               acc_nx [L];
  logic [TDATA_W-1:0] word;
  logic               have_word, word_last, last_pend;
  logic [BIT_W-1:0]   bit_idx;
  logic [P_W-1:0]     phase;
  logic [K_W-1:0]     rl_ptr;
  logic               block_end, stall, step;

  assign block_end = (phase == P_W'(M - 1));
  assign stall     = block_end && m_axis_data_tvalid && !m_axis_data_tready;
  assign step      = have_word && !stall;
  assign s_axis_data_tready   = !have_word;
  assign s_axis_reload_tready = 1'b1;
  assign s_axis_config_tready = 1'b1;
  // a bank switch is safe between blocks: as the last bit of a block is
  // consumed, or while waiting at the start of a block
  assign sw = pend && (step ? block_end : (phase == '0));

  // One polyphase step: every accumulator adds or subtracts its coefficient.
  always_comb begin
    for (int unsigned j = 0; j < L; j++) begin
      acc_nx[j] = word[bit_idx] ? acc[j] + acc_t'(h[act][j * M + (M - 1) - int'(phase)])
                                : acc[j] - acc_t'(h[act][j * M + (M - 1) - int'(phase)]);
    end
  end

  function automatic logic signed [PCM_W-1:0] sat(input acc_t v);
    if (v > acc_t'((1 << (PCM_W - 1)) - 1))   return {1'b0, {(PCM_W - 1){1'b1}}};
    if (v < -acc_t'(1 << (PCM_W - 1)))        return {1'b1, {(PCM_W - 1){1'b0}}};
    return v[PCM_W-1:0];
  endfunction

  // Coefficient memory with its reload port.
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      for (int unsigned k = 0; k < TAPS; k++) begin
        h[0][k] <= default_coef(k);
        h[1][k] <= default_coef(k);
      end
      rl_ptr <= '0;
    end else if (s_axis_reload_tvalid) begin
      h[!req][rl_ptr] <= s_axis_reload_tdata;
      rl_ptr          <= (s_axis_reload_tlast || rl_ptr == K_W'(TAPS - 1)) ? '0 : rl_ptr + 1'b1;
    end
  end

  // Bank selection.
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      act  <= 1'b0;
      req  <= 1'b0;
      pend <= 1'b0;
    end else begin
      if (sw) begin
        act  <= req;
        pend <= 1'b0;
      end
      if (s_axis_config_tvalid) begin
        req  <= s_axis_config_tdata[0];
        pend <= 1'b1;
      end
    end
  end

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      word      <= '0;
      have_word <= 1'b0;
      word_last <= 1'b0;
      last_pend <= 1'b0;
      bit_idx   <= '0;
      phase     <= '0;
      for (int unsigned j = 0; j < L; j++) acc[j] <= '0;
      m_axis_data_tdata  <= '0;
      m_axis_data_tvalid <= 1'b0;
      m_axis_data_tlast  <= 1'b0;
    end else begin
      if (m_axis_data_tready) m_axis_data_tvalid <= 1'b0;

      if (!have_word && s_axis_data_tvalid) begin
        word      <= s_axis_data_tdata;
        word_last <= s_axis_data_tlast;
        have_word <= 1'b1;
        bit_idx   <= '0;
      end

      if (step) begin
        // the end of a tlast beat tags the PCM sample being built
        if (bit_idx == BIT_W'(TDATA_W - 1)) begin
          have_word <= 1'b0;
        end else begin
          bit_idx <= bit_idx + 1'b1;
        end
        if (block_end) begin
          m_axis_data_tdata  <= sat(acc_nx[0]);
          m_axis_data_tvalid <= 1'b1;
          m_axis_data_tlast  <= last_pend || (word_last && bit_idx == BIT_W'(TDATA_W - 1));
          last_pend          <= 1'b0;
          for (int unsigned j = 0; j + 1 < L; j++) acc[j] <= acc_nx[j + 1];
          acc[L-1] <= '0;
          phase    <= '0;
        end else begin
          if (word_last && bit_idx == BIT_W'(TDATA_W - 1)) last_pend <= 1'b1;
          for (int unsigned j = 0; j < L; j++) acc[j] <= acc_nx[j];
          phase <= phase + 1'b1;
        end
      end
    end
  end

  // AXI-Stream: an offered PCM sample stays stable until it is taken.
  logic                    hold_q;
  logic signed [PCM_W-1:0] data_q;
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      hold_q <= 1'b0;
      data_q <= '0;
    end else begin
      hold_q <= m_axis_data_tvalid && !m_axis_data_tready;
      data_q <= m_axis_data_tdata;
      if (hold_q)
        a_hold: assert (m_axis_data_tvalid && m_axis_data_tdata == data_q)
          else $error("PCM output changed while stalled");
    end
  end

endmodule
