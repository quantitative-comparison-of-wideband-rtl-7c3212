// cantilever_model: behavioural model (testbench only, not synthesizable)
// of a cantilever with its excitation and deflection sensing, standing in
// for the DAC -> photothermal excitation -> cantilever -> optical sensor ->
// ADC path of an FM-AFM.
//
// The cantilever is a damped harmonic oscillator
//   H(s) = w0^2 / (s^2 + (w0/Q) s + w0^2),
// turned into a discrete biquad by the bilinear transform, prewarped at w0
// so the resonance lands exactly on f0_hz. The resonance frequency is an
// input and may change while running (a tip-sample force shifts it); the
// coefficients follow it at once. Gain is normalised so that a full-scale
// drive at resonance gives OUT_AMP at the output. The converters are
// modelled as a pure delay of DELAY clocks. Reset clears the state.
module cantilever_model
  import spll_pkg::*;
#(
  parameter real Q       = 7.0,
  parameter int  DELAY   = 10,
  parameter real OUT_AMP = 20000.0
) (
  input  logic    clk,
  input  logic    rst,
  input  real     f0_hz,
  input  sample_t drive,
  output sample_t deflection
);

  real x1, x2, y1, y2, y;
  sample_t dly [DELAY];

  always @(posedge clk) begin
    real w, k, a0, a1, a2, b0, xin;
    if (rst) begin
      x1 = 0.0; x2 = 0.0; y1 = 0.0; y2 = 0.0;
      for (int i = 0; i < DELAY; i++) dly[i] <= '0;
      deflection <= '0;
    end else begin
      w  = 2.0 * PI * f0_hz / F_CLK_HZ;
      k  = w / $tan(w / 2.0);
      a0 = k * k + w / Q * k + w * w;
      a1 = 2.0 * (w * w - k * k);
      a2 = k * k - w / Q * k + w * w;
      b0 = w * w;
      xin = real'(drive) / 32767.0;
      y  = (b0 * (xin + 2.0 * x1 + x2) - a1 * y1 - a2 * y2) / a0;
      x2 = x1; x1 = xin; y2 = y1; y1 = y;
      dly[0] <= sample_t'($rtoi(y / Q * OUT_AMP));
      for (int i = 1; i < DELAY; i++) dly[i] <= dly[i-1];
      deflection <= dly[DELAY-1];
    end
  end

endmodule
