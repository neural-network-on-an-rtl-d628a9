// pynq_mic -- PDM microphone interface with an AXI-Stream manager output.
//
// The core drives the microphone clock, samples the microphone's data line and
// hands the bits on as AXI-Stream words, as the on-board MEMS microphone of
// the target board requires:
//   * Clock generator: pdm_clock is aclk divided by CLK_DIV (high for the first
//     half of the period).  With the default 100 MHz aclk and CLK_DIV = 32 the
//     PDM clock is 3.125 MHz, inside the 1 .. 3.25 MHz the microphone accepts.
//     The clock runs continuously after reset.
//   * Sampling: the microphone is used in its "low" channel mode, in which
//     its data is valid at the rising clock edge.  pdm_data passes a two-flop
//     synchroniser and is taken in the aclk cycle in which pdm_clock rises.
//   * Packing: TDATA_W consecutive samples form one beat; the earliest sample
//     is bit 0.
//   * Framing: tlast is set on every FRAME_WORDS-th beat of a recording.
//   * Control: recording starts at the next PDM rising edge after
//     start_recording is seen high.  At each frame end the core stops if
//     start_recording is low, otherwise it continues with the next frame.
//
// The design description gives the clock generator, sampling on the rising
// edge, the packing into beats, the configurable tlast period and the
// start_recording behaviour.  The clock divider value, the bit order, the
// synchroniser and the overrun handling are choices of this implementation.
// A completed beat that finds the previous one still unaccepted replaces it
// (the microphone cannot be stalled) and pulses `overrun`; otherwise the
// output follows AXI-Stream rules (data held while tvalid && !tready).
//
// Timing: a beat is ready TDATA_W * CLK_DIV aclk cycles after the previous
// one (256 cycles by default), one cycle after the rising edge of its last bit.
module pynq_mic #(
  parameter int unsigned CLK_DIV     = 32,   // aclk cycles per PDM clock period (even, >= 4)
  parameter int unsigned TDATA_W     = 8,    // samples per AXI-Stream beat
  parameter int unsigned FRAME_WORDS = 256   // beats per frame (tlast period)
) (
  input  logic               aclk,
  input  logic               aresetn,
  // microphone pins
  output logic               pdm_clock,
  input  logic               pdm_data,
  // control
  input  logic               start_recording,
  output logic               recording,
  // AXI-Stream manager
  output logic [TDATA_W-1:0] m_axis_tdata,
  output logic               m_axis_tvalid,
  input  logic               m_axis_tready,
  output logic               m_axis_tlast,
  // status
  output logic               overrun
);

  localparam int unsigned DIV_W  = $clog2(CLK_DIV);
  localparam int unsigned BIT_W  = (TDATA_W > 1) ? $clog2(TDATA_W) : 1;
  localparam int unsigned WORD_W = (FRAME_WORDS > 1) ? $clog2(FRAME_WORDS) : 1;

  logic [DIV_W-1:0]  div_cnt;
  logic [1:0]        data_sync;
  logic              rise;          // pdm_clock rises in this cycle
  logic [TDATA_W-1:0] shreg;
  logic [BIT_W-1:0]  bit_cnt;
  logic [WORD_W-1:0] word_cnt;
  logic              word_done, frame_done;

  // ---------------------------------------------------------- clock generator
  // div_cnt and pdm_clock are registered together: pdm_clock is high while
  // div_cnt < CLK_DIV/2.  Reset puts the counter at its last value so that
  // the first period after reset is a full one starting with a rising edge.
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      div_cnt <= DIV_W'(CLK_DIV - 1);
      pdm_clock <= 1'b0;
    end else begin
      div_cnt <= (div_cnt == DIV_W'(CLK_DIV - 1)) ? '0 : div_cnt + 1'b1;
      pdm_clock <= (div_cnt == DIV_W'(CLK_DIV - 1)) || (div_cnt < DIV_W'(CLK_DIV / 2 - 1));
    end
  end

  // pdm_clock has just risen when the counter is at 0.
  assign rise = (div_cnt == '0);

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) data_sync <= '0;
    else          data_sync <= {data_sync[0], pdm_data};
  end

  // ---------------------------------------------------------- sampling and packing
  assign word_done  = recording && rise && (bit_cnt == BIT_W'(TDATA_W - 1));
  assign frame_done = word_done && (word_cnt == WORD_W'(FRAME_WORDS - 1));

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      recording <= 1'b0;
      shreg     <= '0;
      bit_cnt   <= '0;
      word_cnt  <= '0;
    end else begin
      if (!recording) begin
        if (start_recording) begin
          recording <= 1'b1;
          bit_cnt   <= '0;
          word_cnt  <= '0;
        end
      end else if (rise) begin
        shreg[bit_cnt] <= data_sync[1];
        if (word_done) begin
          bit_cnt  <= '0;
          word_cnt <= frame_done ? '0 : word_cnt + 1'b1;
          if (frame_done && !start_recording) recording <= 1'b0;
        end else begin
          bit_cnt <= bit_cnt + 1'b1;
        end
      end
    end
  end

  // ---------------------------------------------------------- AXI-Stream output
  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      m_axis_tdata  <= '0;
      m_axis_tvalid <= 1'b0;
      m_axis_tlast  <= 1'b0;
      overrun       <= 1'b0;
    end else begin
      overrun <= 1'b0;
      if (word_done) begin
        m_axis_tdata  <= shreg;
        m_axis_tdata[bit_cnt] <= data_sync[1];
        m_axis_tvalid <= 1'b1;
        m_axis_tlast  <= frame_done;
        overrun       <= m_axis_tvalid && !m_axis_tready;
      end else if (m_axis_tready) begin
        m_axis_tvalid <= 1'b0;
      end
    end
  end

endmodule
