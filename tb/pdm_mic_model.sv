// pdm_mic_model -- behavioural model of a PDM MEMS microphone (simulation
// only, not synthesizable).
//
// A first-order delta-sigma modulator turns an analog test signal into the
// PDM bit stream: at every falling edge of pdm_clock the integrator adds
// (input - feedback), the new bit is the integrator's sign, and the feedback
// is +1 or -1 accordingly.  The bit is driven a short delay after the
// falling edge and so is valid at the next rising edge, like a microphone
// used on its "low" channel.  The test signal is
//     amp1*sin(2 pi f1 t) + amp2*sin(2 pi f2 t) + noise*uniform(-1, 1)
// with t counted in PDM clock periods of 1/FS_PDM seconds; all amplitudes
// are relative to full scale (1.0).
module pdm_mic_model #(
  parameter real FS_PDM = 3125000.0,
  parameter real F1     = 1000.0,
  parameter real AMP1   = 0.4,
  parameter real F2     = 5000.0,
  parameter real AMP2   = 0.2,
  parameter real NOISE  = 0.05
) (
  input  logic pdm_clock,
  output logic pdm_data
);
  localparam real PI = 3.14159265358979323846;
  real    integ = 0.0;
  real    fb    = 0.0;
  real    v;
  longint tick  = 0;

  initial pdm_data = 1'b0;

  always @(negedge pdm_clock) begin
    v = AMP1 * $sin(2.0 * PI * F1 * tick / FS_PDM)
      + AMP2 * $sin(2.0 * PI * F2 * tick / FS_PDM)
      + NOISE * (real'($urandom_range(20000)) / 10000.0 - 1.0);
    tick++;
    integ += v - fb;
    fb = (integ >= 0.0) ? 1.0 : -1.0;
    #1ns pdm_data = (integ >= 0.0);
  end
endmodule
