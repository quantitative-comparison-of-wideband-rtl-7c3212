// spll_top: wideband, low-latency subtraction-based phase-locked loop
// (S-PLL) for frequency-modulation AFM, with its measurement paths.
//
// Signal flow (all at the 100 MHz sample clock):
//   * phi-VCO 1 runs free at w0 and, through a sine/cosine table, gives the
//     references cos(w0 t), sin(w0 t).
//   * The deflection A*cos((w0+dw)t + phi) is mixed with both; each branch
//     is high-pass filtered, leaving A/2*cos/sin((2w0+dw)t + phi) (the
//     near-dc product is removed with almost no delay).
//   * A CORDIC turns the pair into amplitude and phase (2w0+dw)t + phi.
//   * Outside that detector, the phase feedback loop holds only a
//     subtraction: phi-VCO 2, centred on 2*w0, is compared with the detected
//     phase, and the PI loop filter steers it by dw, which is also the
//     frequency-shift output.
//   * The excitation phase is VCO2 - VCO1 = (w0+dw)t; plus the phase
//     modulation phi_m, it drives a cosine table whose output goes to the
//     excitation DAC.
// Measurement modes: loopback=1 feeds the excitation straight back in as
// the deflection (no converters or cantilever in the path); loop_enable=0
// opens the loop (VCO2 control forced to 0, LF integrator cleared), which
// turns the unit into a bare phase detector whose output is phase_o.
//
// Ports: adc_deflection and adc_modulation are the two ADC words (the
// modulation word is read as a phase, full scale = +/-pi); dac_excitation
// is the excitation DAC word; freq_shift_o is dw in tuning-word units
// (Hz = value * 100e6 / 2^32); phase_o is phi in turns/2^16; amplitude_o is
// the detected amplitude A/2 in mixer units. f0_ftw sets w0; hpf_coef, kp,
// ki set the filters for the cantilever in use. Latencies: deflection to
// detected phase 1 (mixer) + 1 (HPF) + ITER+2 (CORDIC) clocks, then one
// clock each for comparator and loop filter.
// Both phase-to-amplitude conversions reuse one sine/cosine table module;
// the excitation needs only its cosine, so the unused sine output of
// u_exc_lut is left open and removed by synthesis.
// The architecture follows the published S-PLL; widths, table sizes, the PI
// arithmetic and the mode controls' encoding are this design's choices.
module spll_top
  import spll_pkg::*;
#(
  parameter int CORDIC_ITER = 16,
  parameter int LUT_ADDR_W  = 12
) (
  input  logic      clk,
  input  logic      rst,
  // configuration
  input  acc_t      f0_ftw,
  input  hpf_coef_t hpf_coef,
  input  gain_t     kp,
  input  gain_t     ki,
  input  logic      loop_enable,
  input  logic      loopback,
  // converters
  input  sample_t   adc_deflection,
  input  sample_t   adc_modulation,
  output sample_t   dac_excitation,
  // results
  output ftw_t      freq_shift_o,
  output logic signed [PHASE_W-1:0] phase_o,
  output logic [FILT_W-1:0]         amplitude_o,
  output logic      lf_sat_o
);

  acc_t ph_ref, ph_pll, ph_exc;
  ftw_t vco2_ctrl;
  sample_t ref_sin, ref_cos, exc_sin, exc_cos, defl;
  logic signed [FILT_W-1:0] mix_x, mix_y, hp_x, hp_y;
  phase_t meas_phase;

  // phi-VCO at w0 (reference for the mixers)
  phase_vco u_vco_ref (
    .clk, .rst, .centre_ftw(f0_ftw), .offset_ftw('0), .phase(ph_ref)
  );

  // phi-VCO at 2*w0 + dw (inside the phase feedback loop)
  assign vco2_ctrl = loop_enable ? freq_shift_o : '0;
  phase_vco u_vco_pll (
    .clk, .rst, .centre_ftw(f0_ftw << 1), .offset_ftw(vco2_ctrl), .phase(ph_pll)
  );

  // Excitation phase: (2w0+dw)t - w0 t + phi_m
  assign ph_exc = ph_pll - ph_ref + (acc_t'(adc_modulation) << (ACC_W - SAMPLE_W));

  sincos_lut #(.ADDR_W(LUT_ADDR_W)) u_ref_lut (
    .clk, .phase(ph_ref), .sin_o(ref_sin), .cos_o(ref_cos)
  );

  sincos_lut #(.ADDR_W(LUT_ADDR_W)) u_exc_lut (
    .clk, .phase(ph_exc), .sin_o(exc_sin), .cos_o(exc_cos)
  );
  assign dac_excitation = exc_cos;

  assign defl = loopback ? exc_cos : adc_deflection;

  // Phase detector: mixers, HPFs, CORDIC
  quad_mixer u_mix (
    .clk, .sig_i(defl), .ref_cos, .ref_sin, .x_o(mix_x), .y_o(mix_y)
  );

  hpf_biquad u_hpf_x (.clk, .rst, .coef(hpf_coef), .x_i(mix_x), .y_o(hp_x));
  hpf_biquad u_hpf_y (.clk, .rst, .coef(hpf_coef), .x_i(mix_y), .y_o(hp_y));

  cordic_vectoring #(.ITER(CORDIC_ITER)) u_cordic (
    .clk, .x_i(hp_x), .y_i(hp_y), .mag_o(amplitude_o), .phase_o(meas_phase)
  );

  // Subtraction-based phase comparator and loop filter
  phase_comparator u_pc (
    .clk, .rst, .meas_phase, .vco_phase(ph_pll), .phi_o(phase_o)
  );

  loop_filter u_lf (
    .clk, .rst, .clear(!loop_enable), .kp, .ki, .phi_i(phase_o),
    .dw_o(freq_shift_o), .sat_o(lf_sat_o)
  );

  // Opening the loop empties the loop filter: the frequency shift reads 0
  // from the next clock on and the VCO at 2*w0 runs free.
  a_open_loop_clears: assert property (
    @(posedge clk) disable iff (rst) !loop_enable |=> freq_shift_o == '0
  ) else $error("frequency shift not cleared while the loop is open");

endmodule
