// mfcc_preemph -- first-order pre-emphasis filter of the MFCC chain.
//
//     y[n] = x[n] - alpha * x[n-1],   alpha = 1 - 1/32 = 0.96875
//
// computed without a multiplier as y[n] = x[n] - x[n-1] + (x[n-1] >>> 5).
// The coefficient and its shift-based realisation follow the design
// description; the arithmetic shift (rounding towards minus infinity), the
// one-bit wider output that makes saturation unnecessary, and x[-1] = 0 after
// reset are this implementation's choices.
//
// Interface: valid/ready stream in and out with a one-deep output register
// (s_ready = !m_valid || m_ready).  s_last is passed along with its sample.
// Latency: one cycle.
module mfcc_preemph #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = IN_W + 1,
  parameter int unsigned SHIFT = 5            // alpha = 1 - 2^-SHIFT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  s_data,
  input  logic                    s_valid,
  output logic                    s_ready,
  input  logic                    s_last,
  output logic signed [OUT_W-1:0] m_data,
  output logic                    m_valid,
  input  logic                    m_ready,
  output logic                    m_last
);

  logic signed [IN_W-1:0]  x_prev;
  logic signed [OUT_W-1:0] y;

  assign s_ready = !m_valid || m_ready;
  assign y = OUT_W'(s_data) - OUT_W'(x_prev) + OUT_W'(x_prev >>> SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_prev  <= '0;
      m_data  <= '0;
      m_valid <= 1'b0;
      m_last  <= 1'b0;
    end else begin
      if (m_ready) m_valid <= 1'b0;
      if (s_valid && s_ready) begin
        x_prev  <= s_data;
        m_data  <= y;
        m_valid <= 1'b1;
        m_last  <= s_last;
      end
    end
  end

endmodule
