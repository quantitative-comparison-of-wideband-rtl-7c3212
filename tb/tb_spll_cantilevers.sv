// tb_spll_cantilevers: the S-PLL at the resonance frequencies of the three
// cantilever types it is meant for: a standard cantilever (151.46 kHz), the
// one used for imaging (1.53 MHz, frequency shift -1.6 kHz) and an
// ultra-short one (3.44 MHz), plus the 150 kHz / 3 MHz tuning of the
// phase-detector measurement, and the two ends of the 100 kHz - 4 MHz range
// of resonance frequencies the design must cover. For each, the HPF cut-off is set to
// 0.78*f0 (2*f0 then lies 0.1 dB into the pass band) and:
//  * open loop with the excitation looped back, a 45 degree step on the
//    phase-modulation input must appear in full on phase_o (means over
//    1000 clocks, since the 12-bit sine tables quantise the phase);
//  * closed loop on an external sine at f0 + df, the frequency shift
//    output must settle on df (within 0.3 % or 3 Hz).
module tb_spll_cantilevers;
  import spll_pkg::*;

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

  real f_in = 1.0e6, ph_in = 0.0;

  spll_top dut (
    .clk, .rst, .f0_ftw, .hpf_coef, .kp, .ki, .loop_enable, .loopback,
    .adc_deflection, .adc_modulation, .dac_excitation,
    .freq_shift_o(freq_shift), .phase_o(phase), .amplitude_o(amplitude),
    .lf_sat_o(lf_sat)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    ph_in = ph_in + f_in / F_CLK_HZ;
    if (ph_in >= 1.0) ph_in -= 1.0;
    adc_deflection <= sample_t'($rtoi(20000.0 * $cos(2.0 * PI * ph_in)));
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic int wrap16(input int v);
    int r;
    r = ((v % 65536) + 65536) % 65536;
    return r >= 32768 ? r - 65536 : r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mean of phase_o over n clocks, unwrapped around the first sample.
  task automatic mean_phase(input int n, output int mp);
    int first;
    real acc;
    @(posedge clk); #1 first = phase; acc = 0.0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1 acc += real'(wrap16(int'(phase) - first));
    end
    mp = first + $rtoi(acc / real'(n));
  endtask

  task automatic run_case(input string name, input real f0, input real df);
    int p0, p1;
    real s, m, exp_dw, tol;
    rst = 1'b1;
    f0_ftw = hz_to_ftw(f0);
    hpf_coef = butter_hpf(0.78 * f0);
    kp = 24'sd1048576; ki = 24'sd16384;
    loop_enable = 1'b0; loopback = 1'b1; adc_modulation = '0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    // open loop: phase step
    repeat (3000) @(posedge clk);
    mean_phase(1000, p0);
    adc_modulation = 16'sd8192;
    repeat (3000) @(posedge clk);
    mean_phase(1000, p1);
    check(wrap16(p1 - p0 - 8192) < 16 && wrap16(p1 - p0 - 8192) > -16,
          $sformatf("%s: open-loop phase step %0d, expected 8192", name, wrap16(p1 - p0)));
    // closed loop on the external sine
    adc_modulation = '0;
    f_in = f0 + df;
    loopback = 1'b0; loop_enable = 1'b1;
    repeat (8000) @(posedge clk);
    s = 0.0;
    for (int i = 0; i < 4000; i++) begin @(posedge clk); #1 s += real'(freq_shift); end
    m = s / 4000.0 * F_CLK_HZ / 4294967296.0;
    exp_dw = real'(hz_to_ftw(f0 + df)) - real'(hz_to_ftw(f0));
    exp_dw = exp_dw * F_CLK_HZ / 4294967296.0;
    tol = 0.003 * fabs(df) > 3.0 ? 0.003 * fabs(df) : 3.0;
    check(fabs(m - exp_dw) < tol, $sformatf("%s: frequency shift %f Hz, expected %f Hz", name, m, exp_dw));
    $display("%s: f0 %f Hz, shift %f Hz (expected %f), amplitude %0d", name, f0, m, exp_dw, amplitude);
  endtask

  initial begin
    loop_enable = 1'b0; loopback = 1'b1; adc_modulation = '0; kp = '0; ki = '0;
    f0_ftw = '0; hpf_coef = '0;
    run_case("standard cantilever", 151.46e3, 1.0e3);
    run_case("PD-PC tuning 150 kHz", 150.0e3, -500.0);
    run_case("imaging cantilever", 1.53e6, -1.6e3);
    run_case("ultra-short cantilever", 3.44e6, 20.0e3);
    run_case("PD-PC tuning 3 MHz", 3.0e6, 100.0e3);
    run_case("lowest resonance of the range", 100.0e3, 300.0);
    run_case("highest resonance of the range", 4.0e6, -30.0e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
