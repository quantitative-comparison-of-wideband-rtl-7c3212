// tb_spll_phase_modulation: frequency-response measurement of the S-PLL with
// a sinusoidal phase modulation phi_m, excitation looped back inside the
// design (f0 = 3 MHz). The response is demodulated lock-in style here
// (correlation with sin and cos of the modulation over whole periods),
// giving gain and phase; the delay follows from phase = w_m * tau.
// It is run for f0 = 3 MHz and f0 = 150 kHz (HPF cut-off 0.78*f0).
//  * Phase detector alone (loop open): phase_o / phi_m must have unit gain
//    and a delay of 22 clocks plus the HPF group delay at 2*f0 (below
//    1 clock at 3 MHz, below 20 clocks at 150 kHz).
//  * Detector passband: gain within 10 % of 1 at f_m = 0.9*f0.
//  * Closed loop: freq_shift_o is compared with its low-frequency value
//    g0 = P * 2^16 / L (L the measured detector delay); the gain is checked
//    well inside the loop bandwidth (0.90 .. 1.05: at 150 kHz the static
//    loop delay is some 7 % above the delay the modulation measures, since
//    the HPF group delay varies near its cut-off), and the -3 dB bandwidth
//    is located by a sweep. It must lie where an integrator acting on an
//    L-clock delay puts it: within 30 % for the lower gain, and within
//    -30/+60 % for the higher one, whose smaller delay margin lifts the
//    response.
//  * Waveform test at one modulation frequency with the higher gain (100 kHz
//    at f0 = 3 MHz, 10 kHz at 150 kHz): in loop-back the frequency shift
//    follows phi_m itself (the loop holds dw * L = phi_m delayed), so its
//    lag is the PLL latency. It must lie within 25 % of the loop model, and
//    what remains after removing the fundamental must stay under 10 % of it
//    (no spurious oscillation).
module tb_spll_phase_modulation;
  import spll_pkg::*;

  localparam real P = 512.0;                    // modulation amplitude, phase LSB

  logic clk = 1'b0, rst = 1'b1;
  acc_t f0_ftw;
  hpf_coef_t hpf_coef;
  gain_t kp, ki;
  logic loop_enable, loopback;
  sample_t adc_deflection, adc_modulation, dac_excitation;
  ftw_t freq_shift;
  logic signed [PHASE_W-1:0] phase;
  logic [FILT_W-1:0] amplitude;
  logic lf_sat;
  int checks = 0, failures = 0;

  real fm = 0.0, pm = 0.0, g0 = 1.0;
  int offset = 0;

  spll_top dut (
    .clk, .rst, .f0_ftw, .hpf_coef, .kp, .ki, .loop_enable, .loopback,
    .adc_deflection, .adc_modulation, .dac_excitation,
    .freq_shift_o(freq_shift), .phase_o(phase), .amplitude_o(amplitude),
    .lf_sat_o(lf_sat)
  );

  always #5 clk = ~clk;

  // modulation generator: phi_m = offset + P sin(2 pi fm t)
  always @(posedge clk) begin
    pm = pm + fm / F_CLK_HZ;
    if (pm >= 1.0) pm -= 1.0;
    adc_modulation <= sample_t'(offset + $rtoi(P * $sin(2.0 * PI * pm)));
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Correlate the chosen output with the modulation over whole periods.
  // Returns the amplitude and the phase lag (radians) of the response.
  task automatic lockin(input bit use_dw, input int periods, output real amp, output real lag,
                        output real resid);
    real si, co, v, ang, mean, sq;
    int n;
    n = $rtoi(real'(periods) * F_CLK_HZ / fm + 0.5);
    mean = 0.0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      mean += use_dw ? real'(freq_shift) : real'(phase);
    end
    mean = mean / real'(n);
    si = 0.0; co = 0.0; sq = 0.0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      v = (use_dw ? real'(freq_shift) : real'(phase)) - mean;
      // modulation presented to the design this cycle (one clock behind pm)
      ang = 2.0 * PI * (pm - fm / F_CLK_HZ);
      si += v * $sin(ang);
      co += v * $cos(ang);
      sq += v * v;
    end
    amp = 2.0 * $sqrt(si * si + co * co) / real'(n);
    lag = -$atan2(co, si);
    if (lag < -0.5) lag += 2.0 * PI;
    // rms of what is left once the fundamental is taken out
    resid = sq / real'(n) - amp * amp / 2.0;
    resid = resid > 0.0 ? $sqrt(resid) : 0.0;
  endtask

  // Sweep the modulation upwards from f_start in 1.25x steps until the gain,
  // relative to g0, falls below -3 dB; interpolate the crossing.
  task automatic sweep(input real f_start, output real f_3db);
    real amp, lag, res, g, prev_g, prev_f;
    fm = f_start / 1.25; repeat (3000) @(posedge clk);
    lockin(1'b1, 4, amp, lag, res);
    prev_g = amp / g0; prev_f = fm;
    f_3db = -1.0;
    for (real f = f_start; f < 2.0e6 && f_3db < 0.0; f = f * 1.25) begin
      fm = f; repeat (3000) @(posedge clk);
      lockin(1'b1, 4, amp, lag, res);
      g = amp / g0;
      if (g < 0.7071) f_3db = prev_f + (f - prev_f) * (prev_g - 0.7071) / (prev_g - g);
      prev_g = g; prev_f = f;
    end
  endtask

  function automatic real loop_model_hz(input gain_t k, input real l);
    // crossover of ki/256 per clock acting through an l-clock delay
    return real'(k) / 256.0 * l / 65536.0 * F_CLK_HZ / (2.0 * PI);
  endfunction

  // Delay (clocks) of H = K e^-sL / (s + K e^-sL) at f_hz, K = 2 pi fc.
  function automatic real loop_model_latency(input real fc, input real l, input real f_hz);
    real k, w;
    k = 2.0 * PI * fc / F_CLK_HZ;
    w = 2.0 * PI * f_hz / F_CLK_HZ;
    return (w * l + $atan2(w - k * $sin(w * l), k * $cos(w * l))) / w;
  endfunction

  // One resonance setting: detector response at fm_pd (gain 1, delay
  // 22 clocks plus the HPF group delay, at most pd_extra clocks), then the
  // closed-loop response at ki_a (checked at fm_lo and swept) and at ki_b
  // (swept). The loop delay used by the model is the measured one.
  task automatic run_f0(input real f0, input real fm_pd, input real pd_extra,
                        input real fm_lo, input gain_t ki_a, input gain_t ki_b,
                        input real fm_hi, input real fm_wave);
    real amp, lag, res, tau, f_3db, fc_pred, lat, lat_pred;
    int p0;
    rst = 1'b1; fm = 0.0; offset = 0;
    f0_ftw = hz_to_ftw(f0);
    hpf_coef = butter_hpf(0.78 * f0);
    kp = '0; ki = ki_a;
    loop_enable = 1'b0; loopback = 1'b1; adc_deflection = '0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5000) @(posedge clk);
    #1 p0 = phase;

    // phase detector alone
    fm = fm_pd; repeat (3000) @(posedge clk);
    lockin(1'b0, 8, amp, lag, res);
    tau = lag / (2.0 * PI * fm) * F_CLK_HZ;
    check(fabs(amp / P - 1.0) < 0.05, $sformatf("f0 %f: PD gain %f", f0, amp / P));
    check(tau > 21.0 && tau < 22.0 + pd_extra,
          $sformatf("f0 %f: PD delay %f clocks, expected 22 .. %f", f0, tau, 22.0 + pd_extra));
    $display("f0 %f: PD at %f Hz: gain %f, delay %f clocks", f0, fm_pd, amp / P, tau);
    // the detector passband reaches close to f0
    fm = 0.9 * f0; repeat (3000) @(posedge clk);
    lockin(1'b0, 40, amp, lag, res);
    check(amp / P > 0.9 && amp / P < 1.1, $sformatf("f0 %f: PD gain %f at 0.9 f0", f0, amp / P));
    $display("f0 %f: PD at 0.9 f0: gain %f", f0, amp / P);


    // closed loop
    fm = 0.0; offset = -p0;
    repeat (5000) @(posedge clk);
    #1 loop_enable = 1'b1;
    repeat (20000) @(posedge clk);
    g0 = P * 65536.0 / tau;
    fm = fm_lo; repeat (5000) @(posedge clk);
    lockin(1'b1, 2, amp, lag, res);
    check(amp / g0 > 0.90 && amp / g0 < 1.05, $sformatf("f0 %f: PLL gain %f at %f Hz", f0, amp / g0, fm_lo));
    $display("f0 %f: PLL at %f Hz: gain %f of P*2^16/L", f0, fm_lo, amp / g0);

    sweep(2.0 * fm_lo, f_3db);
    fc_pred = loop_model_hz(ki, tau);
    check(f_3db > 0.7 * fc_pred && f_3db < 1.3 * fc_pred,
          $sformatf("f0 %f: PLL bandwidth %f Hz, loop model %f Hz", f0, f_3db, fc_pred));
    $display("f0 %f, ki %0d: PLL -3 dB bandwidth %f Hz (loop model %f Hz)", f0, ki, f_3db, fc_pred);

    ki = ki_b;
    fm = 0.0; repeat (20000) @(posedge clk);
    sweep(fm_hi, f_3db);
    fc_pred = loop_model_hz(ki, tau);
    check(f_3db > 0.7 * fc_pred && f_3db < 1.6 * fc_pred,
          $sformatf("f0 %f: PLL bandwidth %f Hz, loop model %f Hz", f0, f_3db, fc_pred));
    $display("f0 %f, ki %0d: PLL -3 dB bandwidth %f Hz (loop model %f Hz)", f0, ki, f_3db, fc_pred);

    // waveform test at a single modulation frequency: the frequency shift
    // must be a clean sine that follows phi_m with the loop's latency
    fm = fm_wave; repeat (5000) @(posedge clk);
    lockin(1'b1, 8, amp, lag, res);
    lat = lag / (2.0 * PI * fm) * F_CLK_HZ;
    lat_pred = loop_model_latency(fc_pred, tau, fm);
    check(lat > 0.75 * lat_pred && lat < 1.25 * lat_pred,
          $sformatf("f0 %f: latency %f clocks at %f Hz, loop model %f", f0, lat, fm, lat_pred));
    check(res < 0.1 * amp, $sformatf("f0 %f: residual %f of the amplitude", f0, res / amp));
    $display("f0 %f, ki %0d: at %f Hz gain %f, latency %f clocks (loop model %f), residual %f of the amplitude",
             f0, ki, fm, amp / g0, lat, lat_pred, res / amp);
  endtask

  initial begin
    run_f0(3.0e6, 1.0e6, 1.0, 5.0e3, 24'sd2048, 24'sd12288, 25.0e3, 100.0e3);
    run_f0(150.0e3, 5.0e3, 40.0, 500.0, 24'sd128, 24'sd512, 10.0e3, 10.0e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
