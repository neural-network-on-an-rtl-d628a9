// mfcc_extractor -- MFCC feature extraction core.
//
// Turns a stream of signed PCM samples into a stream of Mel-frequency
// cepstral coefficients, NCEPS per frame of FRAME_LEN samples:
//
//   PCM -> mfcc_preemph -> mfcc_window -> fft_r2 -> mel_filterbank
//       -> log_unit -> dct2 -> MFCC stream
//
// The stages are joined by valid/ready handshakes.  The FFT refuses samples
// while it computes and reads out a frame (about 1150 cycles for
// N = 256); the one-deep registers of the pre-emphasis and window stages and
// the upstream source absorb this, which is ample at a PCM rate of one
// sample per ~2000 clocks.  The MFCC output does not wait for its consumer
// (see dct2).  Each MFCC is a signed word in units of 1/256 of a decade of
// filter bank energy (the log10 scale of eq. 2.15), with the FFT scaling of
// fft_r2 included.
//
// The sequence of steps follows the design description (pre-emphasis,
// framing, windowing, FFT, Mel filter bank, logarithm, DCT); how the steps
// are split into modules and joined is this implementation's choice.
// The PCM input's tlast is not used for framing: frames are counted.
module mfcc_extractor
  import sfe_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [PCM_W-1:0] s_axis_tdata,
  input  logic                    s_axis_tvalid,
  output logic                    s_axis_tready,
  input  logic                    s_axis_tlast,
  output logic [MFCC_W-1:0]       m_axis_tdata,
  output logic                    m_axis_tvalid,
  input  logic                    m_axis_tready,
  output logic                    m_axis_tlast,
  output logic                    dropped,
  output logic                    fft_busy
);

  localparam int unsigned BIN_W = $clog2(FRAME_LEN / 2 + 1);
  localparam int unsigned MEL_IW = $clog2(NUM_MEL);

  logic signed [PRE_W-1:0] pe_data, win_data;
  logic                    pe_valid, pe_ready, pe_last;
  logic                    win_valid, win_ready, win_last;
  logic [$clog2(FRAME_LEN)-1:0] win_idx;
  logic signed [FFT_DW-1:0] bin_re, bin_im;
  logic [BIN_W-1:0]        bin_idx;
  logic                    bin_valid, bin_ready, bin_last;
  logic [MEL_W-1:0]        mel_data;
  logic [MEL_IW-1:0]       mel_idx, lg_idx;
  logic                    mel_valid, mel_ready, mel_last;
  logic [LOG_W-1:0]        lg_data;
  logic                    lg_valid, lg_ready, lg_last;

  mfcc_preemph #(.IN_W(PCM_W), .OUT_W(PRE_W)) u_preemph (
    .clk, .rst_n,
    .s_data(s_axis_tdata), .s_valid(s_axis_tvalid), .s_ready(s_axis_tready), .s_last(s_axis_tlast),
    .m_data(pe_data), .m_valid(pe_valid), .m_ready(pe_ready), .m_last(pe_last)
  );

  mfcc_window #(.N(FRAME_LEN), .W(PRE_W)) u_window (
    .clk, .rst_n,
    .s_data(pe_data), .s_valid(pe_valid), .s_ready(pe_ready),
    .m_data(win_data), .m_idx(win_idx), .m_valid(win_valid), .m_ready(win_ready), .m_last(win_last)
  );

  fft_r2 #(.N(FRAME_LEN), .IN_W(PRE_W), .DW(FFT_DW)) u_fft (
    .clk, .rst_n,
    .s_data(win_data), .s_valid(win_valid), .s_ready(win_ready),
    .m_re(bin_re), .m_im(bin_im), .m_idx(bin_idx), .m_valid(bin_valid), .m_ready(bin_ready),
    .m_last(bin_last), .calc_busy(fft_busy)
  );

  mel_filterbank #(.N(FRAME_LEN), .FS(FS_PCM_HZ), .NMEL(NUM_MEL), .DW(FFT_DW), .EW(MEL_W)) u_mel (
    .clk, .rst_n,
    .s_re(bin_re), .s_im(bin_im), .s_idx(bin_idx), .s_valid(bin_valid), .s_ready(bin_ready),
    .s_last(bin_last),
    .m_data(mel_data), .m_idx(mel_idx), .m_valid(mel_valid), .m_ready(mel_ready), .m_last(mel_last)
  );

  log_unit #(.IN_W(MEL_W), .OUT_W(LOG_W), .FRAC(8), .IDX_W(MEL_IW)) u_log (
    .clk, .rst_n,
    .s_data(mel_data), .s_idx(mel_idx), .s_valid(mel_valid), .s_ready(mel_ready), .s_last(mel_last),
    .m_data(lg_data), .m_idx(lg_idx), .m_valid(lg_valid), .m_ready(lg_ready), .m_last(lg_last)
  );

  dct2 #(.NMEL(NUM_MEL), .NCEPS(NUM_CEPS), .IN_W(LOG_W), .OUT_W(MFCC_W)) u_dct (
    .clk, .rst_n,
    .s_data(lg_data), .s_idx(lg_idx), .s_valid(lg_valid), .s_ready(lg_ready), .s_last(lg_last),
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast, .dropped
  );

endmodule
