// mel_filterbank -- power spectrum and triangular Mel filter bank.
//
// For every FFT bin k = 0 .. N/2 that arrives on s_* the power
//     P[k] = re^2 + im^2
// is formed and added, weighted, into the NUM_MEL filter energies
//     E[i] = sum_k P[k] * H_i(k).
// The filters are the usual triangles whose NUM_MEL+2 edge points are
// equally spaced on the Mel scale mel(f) = 2595*log10(1 + f/700) between 0
// and FS/2, each edge rounded down to an FFT bin.  Because neighbouring
// triangles overlap by exactly one slope, every bin lies on the rising slope
// of at most one filter (seg[k]) and on the falling slope of the one before
// it, with weights g and 1-g.  Two elaboration-time tables hold seg[k] and
// g[k] (Q0.8), so a bin costs one cycle, one squarer pair and two
// weighted additions.
//
// After bin N/2 the NUM_MEL energies, shifted back by the 8 weight fraction
// bits so that they are in units of re^2 + im^2, are sent out on m_*
// (valid/ready, index m_idx, m_last on the last one) and the accumulators
// are cleared for the next frame.  s_ready is low while energies are being sent.
//
// From the design description: a bank of 32 triangular filters on the Mel
// scale (eq. 2.14) applied to the power spectrum.  The bin mapping of the
// edges, the Q0.8 weights and the widths are this implementation's choices.
module mel_filterbank
  import sfe_pkg::*;
#(
  parameter int unsigned N       = FRAME_LEN,
  parameter int unsigned FS      = FS_PCM_HZ,
  parameter int unsigned NMEL    = NUM_MEL,
  parameter int unsigned DW      = FFT_DW,
  parameter int unsigned EW      = MEL_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [DW-1:0]       s_re,
  input  logic signed [DW-1:0]       s_im,
  input  logic [$clog2(N/2+1)-1:0]  s_idx,
  input  logic                       s_valid,
  output logic                       s_ready,
  input  logic                       s_last,
  output logic [EW-1:0]              m_data,
  output logic [$clog2(NMEL)-1:0]    m_idx,
  output logic                       m_valid,
  input  logic                       m_ready,
  output logic                       m_last
);

  localparam int unsigned NB  = N / 2 + 1;            // bins of a real spectrum
  localparam int unsigned SW  = $clog2(NMEL + 2);     // segment index width
  localparam int unsigned MW  = $clog2(NMEL);
  localparam int unsigned PWW = 2 * DW;               // power word

  typedef logic [SW-1:0] seg_tab_t [NB];
  typedef logic [8:0]    wgt_tab_t [NB];

  function automatic seg_tab_t make_seg();
    seg_tab_t t;
    for (int k = 0; k < int'(NB); k++) t[k] = SW'(mel_seg(k, NMEL, N, FS));
    return t;
  endfunction
  function automatic wgt_tab_t make_wgt();
    wgt_tab_t t;
    for (int k = 0; k < int'(NB); k++) t[k] = 9'(mel_wgt(k, NMEL, N, FS));
    return t;
  endfunction
  localparam seg_tab_t SEG = make_seg();
  localparam wgt_tab_t WGT = make_wgt();

  logic [EW-1:0]   acc [NMEL];
  logic            sending;
  logic [MW-1:0]   ocnt;
  logic [PWW-1:0]  pwr;
  logic [SW-1:0]   seg;
  logic [8:0]      g_rise, g_fall;
  logic [EW-1:0]   add_rise, add_fall;

  always_comb begin
    pwr      = PWW'(PWW'(s_re) * PWW'(s_re)) + PWW'(PWW'(s_im) * PWW'(s_im));
    seg      = SEG[s_idx];
    g_rise   = WGT[s_idx];
    g_fall   = 9'(1 << WGT_FRAC) - g_rise;
    add_rise = EW'(pwr) * EW'(g_rise);
    add_fall = EW'(pwr) * EW'(g_fall);
  end

  assign s_ready = !sending;
  assign m_valid = sending;
  assign m_idx   = ocnt;
  assign m_data  = acc[ocnt] >> WGT_FRAC;    // drop the weight fraction
  assign m_last  = (ocnt == MW'(NMEL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NMEL); i++) acc[i] <= '0;
      sending <= 1'b0;
      ocnt    <= '0;
    end else if (sending) begin
      if (m_ready) begin
        acc[ocnt] <= '0;
        ocnt      <= ocnt + 1'b1;
        if (m_last) begin
          sending <= 1'b0;
          ocnt    <= '0;
        end
      end
    end else if (s_valid) begin
      for (int i = 0; i < int'(NMEL); i++) begin
        if (SW'(i) == seg)           acc[i] <= acc[i] + add_rise;
        else if (SW'(i + 1) == seg)  acc[i] <= acc[i] + add_fall;
      end
      if (s_last) sending <= 1'b1;
    end
  end

endmodule
