// log_unit -- base-10 logarithm of a filter bank energy.
//
// For an unsigned input x >= 1 the output approximates log10(x) in unsigned
// fixed point with FRAC fractional bits.  The base-2 logarithm is taken
// first with Mitchell's approximation: the position e of the leading one is
// the integer part and the FRAC bits that follow the leading one are used
// directly as the fraction (log2(1+f) ~ f, error below 0.087).  The result
// is then multiplied by log10(2) in Q0.16 (19728).  x = 0 gives 0.
//
// The design description applies a base-10 logarithm to the Mel filter
// bank energies (eq. 2.15) and refers to a published hardware log algorithm
// without giving it; the Mitchell approximation and the number format are
// this implementation's choices.
//
// Interface: valid/ready in and out, one-deep output register; s_idx and
// s_last are carried along.  Latency one cycle.
module log_unit
  import sfe_pkg::*;
#(
  parameter int unsigned IN_W  = MEL_W,
  parameter int unsigned OUT_W = LOG_W,
  parameter int unsigned FRAC  = 8,
  parameter int unsigned IDX_W = $clog2(NUM_MEL)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [IN_W-1:0]   s_data,
  input  logic [IDX_W-1:0]  s_idx,
  input  logic              s_valid,
  output logic              s_ready,
  input  logic              s_last,
  output logic [OUT_W-1:0]  m_data,
  output logic [IDX_W-1:0]  m_idx,
  output logic              m_valid,
  input  logic              m_ready,
  output logic              m_last
);

  localparam int unsigned EXP_W  = $clog2(IN_W);
  localparam int unsigned L2_W   = EXP_W + FRAC;      // log2 in Q(EXP_W).FRAC
  localparam logic [15:0] LOG10_2_Q16 = 16'd19728;    // round(log10(2) * 2^16)

  logic [EXP_W-1:0]   e;
  logic [IN_W-1:0]    norm;
  logic [L2_W-1:0]    l2;
  logic [L2_W+15:0]   l10;

  // leading-one position
  always_comb begin
    e = '0;
    for (int i = 0; i < int'(IN_W); i++)
      if (s_data[i]) e = EXP_W'(i);
  end

  // x << (IN_W-1-e) puts the leading one in the top bit; the FRAC bits under
  // it are the mantissa fraction.
  assign norm = s_data << (EXP_W'(IN_W - 1) - e);
  assign l2   = {e, norm[IN_W-2 -: FRAC]};
  assign l10  = l2 * LOG10_2_Q16;
  assign s_ready = !m_valid || m_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_data  <= '0;
      m_idx   <= '0;
      m_valid <= 1'b0;
      m_last  <= 1'b0;
    end else begin
      if (m_ready) m_valid <= 1'b0;
      if (s_valid && s_ready) begin
        m_data  <= (s_data == '0) ? '0 : OUT_W'(l10 >> 16);
        m_idx   <= s_idx;
        m_valid <= 1'b1;
        m_last  <= s_last;
      end
    end
  end

endmodule
