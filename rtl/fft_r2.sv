// fft_r2 -- memory-based radix-2 decimation-in-time FFT of a real frame.
//
// The core works in three phases on one frame of N samples:
//   LOAD  N real samples are accepted (s_valid/s_ready) and written to the
//         working memory at bit-reversed addresses, scaled up by 2^IN_SHIFT
//         so that the internal DW-bit word is used fully.
//   CALC  log2(N) stages of N/2 butterflies, one butterfly per clock, in
//         place.  Butterfly (i, j = i + 2^s) of stage s with twiddle
//         W = exp(-j*2*pi*k/N), k = (i mod 2^s) * N / 2^(s+1):
//             t = b * W,  a' = (a + t) / 2,  b' = (a - t) / 2
//         The halving in every stage keeps all values in range, so the
//         result is X[k] * 2^IN_SHIFT / N where X is the DFT
//             X[k] = sum_n x[n] * exp(-j*2*pi*n*k/N).
//   OUT   bins 0 .. N/2 (the non-redundant half of a real signal's
//         spectrum) are read out in natural order on m_* (valid/ready).
// Twiddles are signed Q1.14 tables computed at elaboration time; products
// are truncated (arithmetic shift).
//
// The design description asks for an FFT on the FPGA and points to a radix-2
// DIT algorithm with the flow "load the samples into memory, apply the FFT,
// read the samples"; N = 256 is the frame length it names.  The word widths,
// the per-stage scaling and the single-butterfly schedule are this
// implementation's choices.  The core does not look at an input tlast: a
// frame is simply the next N samples.
//
// Timing: N load cycles (at the source's pace), N/2*log2(N) compute cycles
// (1024 for N = 256), then N/2+1 output cycles when the sink is ready.
// s_ready is low outside LOAD.
module fft_r2
  import sfe_pkg::*;
#(
  parameter int unsigned N    = FRAME_LEN,
  parameter int unsigned IN_W = PRE_W,
  parameter int unsigned DW   = FFT_DW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [IN_W-1:0]   s_data,
  input  logic                     s_valid,
  output logic                     s_ready,
  output logic signed [DW-1:0]     m_re,
  output logic signed [DW-1:0]     m_im,
  output logic [$clog2(N/2+1)-1:0] m_idx,
  output logic                     m_valid,
  input  logic                     m_ready,
  output logic                     m_last,
  output logic                     calc_busy
);

  localparam int unsigned LOG2N    = $clog2(N);
  localparam int unsigned IN_SHIFT = DW - IN_W - 1;
  localparam int unsigned OUT_BINS = N / 2 + 1;
  localparam int unsigned PW       = DW + TW_W + 1;   // product width

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_OUT} state_t;
  typedef logic signed [TW_W-1:0] tw_tab_t [N/2];
  typedef logic signed [DW-1:0]   word_t;

  function automatic tw_tab_t make_cos();
    tw_tab_t t;
    for (int k = 0; k < int'(N / 2); k++) t[k] = cos_q14(2 * k, N);
    return t;
  endfunction
  function automatic tw_tab_t make_msin();   // -sin(2*pi*k/N) = cos(2*pi*k/N + pi/2)
    tw_tab_t t;
    for (int k = 0; k < int'(N / 2); k++) t[k] = cos_q14(2 * k + N / 2, N);
    return t;
  endfunction
  localparam tw_tab_t TW_COS  = make_cos();
  localparam tw_tab_t TW_MSIN = make_msin();

  state_t               state;
  word_t                mre [N];
  word_t                mim [N];
  logic [LOG2N-1:0]     cnt;          // load / output counter
  logic [$clog2(N/2+1)-1:0] ocnt;
  logic [$clog2(LOG2N)-1:0] stage;
  logic [LOG2N-2:0]     bf;           // butterfly within stage

  // butterfly addressing and arithmetic
  logic [LOG2N-1:0]     half, ia, ib;
  logic [LOG2N-2:0]     pos, tw_k;
  word_t                ar, ai, br, bi;
  logic signed [PW-1:0] pr, pi;
  logic signed [DW:0]   tr, ti, sr0, si0, sr1, si1;

  always_comb begin
    half = LOG2N'(1) << stage;
    pos  = bf & (half[LOG2N-2:0] - 1'b1);
    ia   = (LOG2N'(bf >> stage) << (stage + 1)) | LOG2N'(pos);
    ib   = ia | half;
    tw_k = pos << (LOG2N - 1 - int'(stage));
    ar = mre[ia]; ai = mim[ia];
    br = mre[ib]; bi = mim[ib];
    pr = PW'(br) * PW'(TW_COS[tw_k]) - PW'(bi) * PW'(TW_MSIN[tw_k]);
    pi = PW'(br) * PW'(TW_MSIN[tw_k]) + PW'(bi) * PW'(TW_COS[tw_k]);
    tr = (DW+1)'(pr >>> TW_FRAC);
    ti = (DW+1)'(pi >>> TW_FRAC);
    sr0 = (DW+1)'(ar) + tr;  si0 = (DW+1)'(ai) + ti;
    sr1 = (DW+1)'(ar) - tr;  si1 = (DW+1)'(ai) - ti;
  end

  assign s_ready   = (state == S_LOAD);
  assign m_valid   = (state == S_OUT);
  assign m_re      = mre[LOG2N'(ocnt)];
  assign m_im      = mim[LOG2N'(ocnt)];
  assign m_idx     = ocnt;
  assign m_last    = (ocnt == $bits(ocnt)'(OUT_BINS - 1));
  assign calc_busy = (state == S_CALC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      ocnt  <= '0;
      stage <= '0;
      bf    <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (s_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOG2N'(N - 1)) begin
            state <= S_CALC;
            stage <= '0;
            bf    <= '0;
          end
        end
        S_CALC: begin
          bf <= bf + 1'b1;
          if (bf == (LOG2N-1)'(N / 2 - 1)) begin
            stage <= stage + 1'b1;
            if (stage == $bits(stage)'(LOG2N - 1)) begin
              state <= S_OUT;
              ocnt  <= '0;
            end
          end
        end
        S_OUT: if (m_ready) begin
          ocnt <= ocnt + 1'b1;
          if (m_last) begin
            state <= S_LOAD;
            cnt   <= '0;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // working memory: one write port per phase (LOAD writes one word, CALC two)
  always_ff @(posedge clk) begin
    if (state == S_LOAD && s_valid) begin
      mre[bitrev(32'(cnt), LOG2N)] <= word_t'(s_data) <<< IN_SHIFT;
      mim[bitrev(32'(cnt), LOG2N)] <= '0;
    end else if (state == S_CALC) begin
      mre[ia] <= DW'(sr0 >>> 1);  mim[ia] <= DW'(si0 >>> 1);
      mre[ib] <= DW'(sr1 >>> 1);  mim[ib] <= DW'(si1 >>> 1);
    end
  end

endmodule
