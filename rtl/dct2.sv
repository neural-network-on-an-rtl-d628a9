// dct2 -- type II DCT of the log filter bank energies; produces the MFCCs.
//
// The NMEL log energies Lg[i] of one frame are collected from s_* into a
// small buffer.  Then the coefficients
//     C[n] = sum_{i=0}^{NMEL-1} Lg[i] * cos(pi * n * (i + 0.5) / NMEL),
//            n = 0 .. NCEPS-1
// are computed with one multiply-accumulate per clock, using a signed Q1.14
// cosine table computed at elaboration time.  C[n] keeps the fixed-point
// scale of its input (the Q1.14 product is shifted back by 14 bits) and is
// sent as a signed MFCC_W-bit word, which is a multiple of 8 bits as the
// DMA transfer to the processor requires.
//
// Output behaviour follows the design description: the feature stream is
// written whether or not the consumer has read the previous word.  Each
// coefficient is presented for exactly one cycle with m_axis_tvalid high;
// m_axis_tready does not stall the core.  If it is low in that cycle the
// word is lost and `dropped` pulses.  m_axis_tlast marks C[NCEPS-1] of a
// frame.
//
// From the design description: a type II DCT computes the MFCCs from the
// log Mel energies (eq. 2.16 and section 5.3).  NCEPS = 10, the fixed-point
// formats and the one-MAC-per-clock schedule are this implementation's
// choices.
//
// Timing: the core accepts inputs (s_ready high) until the last energy of a
// frame; NMEL cycles later C[0] appears, then one coefficient every NMEL
// cycles.  After C[NCEPS-1] it accepts the next frame.
module dct2
  import sfe_pkg::*;
#(
  parameter int unsigned NMEL  = NUM_MEL,
  parameter int unsigned NCEPS = NUM_CEPS,
  parameter int unsigned IN_W  = LOG_W,
  parameter int unsigned OUT_W = MFCC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [IN_W-1:0]         s_data,
  input  logic [$clog2(NMEL)-1:0] s_idx,
  input  logic                    s_valid,
  output logic                    s_ready,
  input  logic                    s_last,
  output logic [OUT_W-1:0]        m_axis_tdata,
  output logic                    m_axis_tvalid,
  input  logic                    m_axis_tready,
  output logic                    m_axis_tlast,
  output logic                    dropped
);

  localparam int unsigned IW    = $clog2(NMEL);
  localparam int unsigned NW    = (NCEPS > 1) ? $clog2(NCEPS) : 1;
  localparam int unsigned ACC_W = IN_W + TW_W + IW + 2;

  typedef logic signed [TW_W-1:0] cos_tab_t [NCEPS * NMEL];
  function automatic cos_tab_t make_cos();
    cos_tab_t t;
    for (int n = 0; n < int'(NCEPS); n++)
      for (int i = 0; i < int'(NMEL); i++)
        t[n * NMEL + i] = cos_q14(n * (2 * i + 1), 2 * NMEL);
    return t;
  endfunction
  localparam cos_tab_t COS = make_cos();

  typedef enum logic {S_COLLECT, S_CALC} state_t;

  state_t                   state;
  logic [IN_W-1:0]          lg [NMEL];
  logic [IW-1:0]            i_cnt;
  logic [NW-1:0]            n_cnt;
  logic signed [ACC_W-1:0]  acc, acc_nx;

  assign s_ready = (state == S_COLLECT);
  assign acc_nx  = acc + ACC_W'($signed({1'b0, lg[i_cnt]})) * ACC_W'(COS[int'(n_cnt) * NMEL + int'(i_cnt)]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_COLLECT;
      for (int i = 0; i < int'(NMEL); i++) lg[i] <= '0;
      i_cnt         <= '0;
      n_cnt         <= '0;
      acc           <= '0;
      m_axis_tdata  <= '0;
      m_axis_tvalid <= 1'b0;
      m_axis_tlast  <= 1'b0;
      dropped       <= 1'b0;
    end else begin
      m_axis_tvalid <= 1'b0;
      m_axis_tlast  <= 1'b0;
      dropped       <= m_axis_tvalid && !m_axis_tready;
      unique case (state)
        S_COLLECT: if (s_valid) begin
          lg[s_idx] <= s_data;
          if (s_last) begin
            state <= S_CALC;
            i_cnt <= '0;
            n_cnt <= '0;
            acc   <= '0;
          end
        end
        S_CALC: begin
          if (i_cnt == IW'(NMEL - 1)) begin
            m_axis_tdata  <= OUT_W'(acc_nx >>> TW_FRAC);
            m_axis_tvalid <= 1'b1;
            m_axis_tlast  <= (n_cnt == NW'(NCEPS - 1));
            acc           <= '0;
            i_cnt         <= '0;
            n_cnt         <= n_cnt + 1'b1;
            if (n_cnt == NW'(NCEPS - 1)) state <= S_COLLECT;
          end else begin
            acc   <= acc_nx;
            i_cnt <= i_cnt + 1'b1;
          end
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

endmodule
