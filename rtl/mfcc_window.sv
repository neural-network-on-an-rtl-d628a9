// mfcc_window -- framing and Hamming windowing of the MFCC chain.
//
// The incoming sample stream is cut into consecutive, non-overlapping frames
// of N samples.  Sample n of a frame (0 <= n < N) is multiplied by
//     w(n) = 0.54 - 0.46 * cos(2*pi*n / (N-1))
// held as an unsigned Q0.16 table that is computed at elaboration time
// (sfe_pkg::hamming_q16).  The product is shifted right by 16 and rounded
// towards minus infinity, so the output has the input's width.  m_last marks
// sample N-1 of each frame, m_idx gives n.
//
// The Hamming window and its formula follow the design description.  It
// names a frame length of 256 samples; the frames not overlapping, the table
// format and the rounding are choices of this implementation.
//
// Interface: valid/ready in and out, one-deep output register, latency one
// cycle.
module mfcc_window
  import sfe_pkg::*;
#(
  parameter int unsigned N = FRAME_LEN,
  parameter int unsigned W = PRE_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [W-1:0]     s_data,
  input  logic                    s_valid,
  output logic                    s_ready,
  output logic signed [W-1:0]     m_data,
  output logic [$clog2(N)-1:0]    m_idx,
  output logic                    m_valid,
  input  logic                    m_ready,
  output logic                    m_last
);

  localparam int unsigned IW = $clog2(N);

  typedef logic [15:0] win_t [N];
  function automatic win_t make_window();
    win_t t;
    for (int n = 0; n < int'(N); n++) t[n] = hamming_q16(n, N);
    return t;
  endfunction
  localparam win_t WIN = make_window();

  logic [IW-1:0]        n_cnt;
  logic signed [W+16:0] prod;

  assign s_ready = !m_valid || m_ready;
  assign prod    = (W+17)'(s_data) * $signed({1'b0, WIN[n_cnt]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_cnt   <= '0;
      m_data  <= '0;
      m_idx   <= '0;
      m_valid <= 1'b0;
      m_last  <= 1'b0;
    end else begin
      if (m_ready) m_valid <= 1'b0;
      if (s_valid && s_ready) begin
        m_data  <= W'(prod >>> 16);
        m_idx   <= n_cnt;
        m_valid <= 1'b1;
        m_last  <= (n_cnt == IW'(N - 1));
        n_cnt   <= (n_cnt == IW'(N - 1)) ? '0 : n_cnt + 1'b1;
      end
    end
  end

endmodule
