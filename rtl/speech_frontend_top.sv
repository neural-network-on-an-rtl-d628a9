// speech_frontend_top -- programmable-logic front end of a speech command
// recogniser: on-board PDM microphone in, MFCC feature stream out.
//
//   pdm_clock/pdm_data -> pynq_mic -> (8-bit PDM beats) -> fir_decimator
//     -> (16-bit PCM at 1/64 of the PDM rate) -> mfcc_extractor
//     -> (32-bit MFCC words, NUM_CEPS per 256-sample frame) -> m_axis_mfcc
//
// With a 100 MHz aclk the PDM clock is 3.125 MHz, the PCM rate 48.8 kHz and
// one frame of 256 PCM samples takes 524,288 clocks (5.2 ms).  The MFCC
// stream is meant for a DMA engine that writes it into processor memory,
// where a software neural network classifies the command; neither is part
// of this RTL.  The FIR filter has two coefficient banks: s_axis_reload
// writes the idle one and a byte on s_axis_config selects the bank in use.
//
// Ports are plain AXI-Stream signals.  Status outputs: mic_overrun pulses
// when a microphone beat was overwritten before the filter took it,
// mfcc_dropped when an MFCC word was presented while m_axis_mfcc_tready was
// low (the feature stream never waits, as the design description asks).
//
// The chain of blocks and the data formats between them (PDM stream, PCM
// stream, MFCC stream) follow the design description's system diagram;
// the status outputs are this implementation's additions.
module speech_frontend_top
  import sfe_pkg::*;
#(
  parameter int unsigned CLK_DIV     = 32,    // aclk cycles per PDM clock
  parameter int unsigned FRAME_WORDS = 256    // microphone beats per tlast
) (
  input  logic                    aclk,
  input  logic                    aresetn,
  // microphone
  output logic                    pdm_clock,
  input  logic                    pdm_data,
  input  logic                    start_recording,
  output logic                    recording,
  // FIR coefficient bank select and reload
  input  logic [7:0]              s_axis_config_tdata,
  input  logic                    s_axis_config_tvalid,
  output logic                    s_axis_config_tready,
  input  logic signed [15:0]      s_axis_reload_tdata,
  input  logic                    s_axis_reload_tvalid,
  output logic                    s_axis_reload_tready,
  input  logic                    s_axis_reload_tlast,
  // MFCC feature stream (to the DMA engine)
  output logic [MFCC_W-1:0]       m_axis_mfcc_tdata,
  output logic                    m_axis_mfcc_tvalid,
  input  logic                    m_axis_mfcc_tready,
  output logic                    m_axis_mfcc_tlast,
  // status
  output logic                    mic_overrun,
  output logic                    mfcc_dropped
);

  logic [PDM_TDATA_W-1:0]  pdm_tdata;
  logic                    pdm_tvalid, pdm_tready, pdm_tlast;
  logic signed [PCM_W-1:0] pcm_tdata;
  logic                    pcm_tvalid, pcm_tready, pcm_tlast;

  pynq_mic #(.CLK_DIV(CLK_DIV), .TDATA_W(PDM_TDATA_W), .FRAME_WORDS(FRAME_WORDS)) u_mic (
    .aclk, .aresetn,
    .pdm_clock, .pdm_data, .start_recording, .recording,
    .m_axis_tdata(pdm_tdata), .m_axis_tvalid(pdm_tvalid), .m_axis_tready(pdm_tready),
    .m_axis_tlast(pdm_tlast), .overrun(mic_overrun)
  );

  fir_decimator #(.TDATA_W(PDM_TDATA_W), .M(DECIM_M), .L(2), .COEF_W(16), .PCM_W(PCM_W)) u_fir (
    .aclk, .aresetn,
    .s_axis_data_tdata(pdm_tdata), .s_axis_data_tvalid(pdm_tvalid), .s_axis_data_tready(pdm_tready),
    .s_axis_data_tlast(pdm_tlast),
    .s_axis_config_tdata, .s_axis_config_tvalid, .s_axis_config_tready,
    .s_axis_reload_tdata, .s_axis_reload_tvalid, .s_axis_reload_tready, .s_axis_reload_tlast,
    .m_axis_data_tdata(pcm_tdata), .m_axis_data_tvalid(pcm_tvalid), .m_axis_data_tready(pcm_tready),
    .m_axis_data_tlast(pcm_tlast)
  );

  mfcc_extractor u_mfcc (
    .clk(aclk), .rst_n(aresetn),
    .s_axis_tdata(pcm_tdata), .s_axis_tvalid(pcm_tvalid), .s_axis_tready(pcm_tready),
    .s_axis_tlast(pcm_tlast),
    .m_axis_tdata(m_axis_mfcc_tdata), .m_axis_tvalid(m_axis_mfcc_tvalid),
    .m_axis_tready(m_axis_mfcc_tready), .m_axis_tlast(m_axis_mfcc_tlast),
    .dropped(mfcc_dropped), .fft_busy()
  );

endmodule
