// tb_spll_top: end-to-end test of the S-PLL at its default sizes, tuned for
// a 3 MHz cantilever (HPF cut-off 2.3 MHz). Three stages:
//  A. Open loop, excitation looped back to the input: the bare phase
//     detector. A step of the phase modulation input must appear on
//     phase_o with its full size, after exactly 4 + CORDIC_ITER + 2 clocks
//     (cosine table, mixer, HPF, CORDIC, comparator); the loop filter must
//     stay at zero and the amplitude must match the mixing arithmetic.
//  B. Closed loop on an external deflection sine generated here at
//     f0 + 50 kHz and then f0 - 30 kHz: the frequency shift output must
//     settle on the offset and the loop must lock within 2000 clocks.
//  C. Closed loop, looped back, as in the loop-bandwidth measurement: a
//     phase-modulation step of P makes the loop retune the excitation by
//     P/L turns per clock, L being the loop's latency in clocks.
// Each mode (open loop, closed loop, loopback, external input, phase
// modulation) is counted and must have been used.
module tb_spll_top;
  import spll_pkg::*;

  localparam int  PD_LAT = 4 + 16 + 2;          // phase-modulation step to phase_o
  localparam real F0     = 3.0e6;

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
  int n_open = 0, n_closed = 0, n_loopback = 0, n_external = 0, n_phase_mod = 0;

  // external deflection generator
  real f_in = F0, ph_in = 0.0;
  logic ext_on = 1'b0;

  spll_top dut (
    .clk, .rst, .f0_ftw, .hpf_coef, .kp, .ki, .loop_enable, .loopback,
    .adc_deflection, .adc_modulation, .dac_excitation,
    .freq_shift_o(freq_shift), .phase_o(phase), .amplitude_o(amplitude),
    .lf_sat_o(lf_sat)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (ext_on) begin
      ph_in = ph_in + f_in / F_CLK_HZ;
      if (ph_in >= 1.0) ph_in -= 1.0;
      adc_deflection <= sample_t'($rtoi(30000.0 * $cos(2.0 * PI * ph_in)));
    end
    if (!rst) begin
      if (loop_enable) n_closed++; else n_open++;
      if (loopback) n_loopback++; else n_external++;
      if (adc_modulation != 0) n_phase_mod++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  // Mean of phase_o over n clocks, unwrapped around the first sample
  // (the 12-bit sine tables quantise single samples to +/-16 LSB).
  task automatic mean_phase(input int n, output int mp);
    int first;
    real acc;
    @(posedge clk); #1 first = phase; acc = 0.0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1 acc += real'(wrap16(int'(phase) - first));
    end
    mp = first + $rtoi(acc / real'(n));
  endtask

  // mean of freq_shift over n clocks
  task automatic mean_dw(input int n, output real m);
    real s;
    s = 0.0;
    for (int i = 0; i < n; i++) begin @(posedge clk); #1 s += real'(freq_shift); end
    m = s / real'(n);
  endtask

  initial begin
    int p0, pm0, p1, t_lock;
    real m, exp_dw, a_exp, dw0;
    logic signed [PHASE_W-1:0] ph_before;

    f0_ftw = hz_to_ftw(F0);
    hpf_coef = butter_hpf(2.3e6);
    kp = '0; ki = '0;
    loop_enable = 1'b0; loopback = 1'b1;
    adc_deflection = '0; adc_modulation = '0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;

    // ---- A: open loop, loopback ----
    repeat (500) @(posedge clk);
    mean_phase(1000, pm0);
    #1 p0 = phase;
    check(freq_shift == 0, "open loop: freq shift not zero");
    // amplitude: 32767*32767/2^7/2 (mixing) * HPF gain at 6 MHz
    a_exp = 32767.0 * 32767.0 / 128.0 / 2.0 / $sqrt(1.0 + $pow(2.3 / 6.0, 4));
    check(fabs(real'(amplitude) - a_exp) < 0.01 * a_exp,
          $sformatf("open loop amplitude %0d, expected %f", amplitude, a_exp));
    // phase step of +45 degrees on the modulation input
    adc_modulation = 16'sd8192;
    repeat (PD_LAT - 1) @(posedge clk);
    #1 ph_before = phase;
    check(wrap16(int'(ph_before) - p0) < 40 && wrap16(int'(ph_before) - p0) > -40,
          $sformatf("phase moved before the detector latency: %0d", wrap16(int'(ph_before) - p0)));
    @(posedge clk); #1;
    check(wrap16(int'(phase) - p0) > 4096,
          $sformatf("phase step not seen after %0d clocks: %0d", PD_LAT, wrap16(int'(phase) - p0)));
    repeat (300) @(posedge clk);
    mean_phase(1000, p1);
    check(wrap16(p1 - pm0 - 8192) < 8 && wrap16(p1 - pm0 - 8192) > -8,
          $sformatf("phase step size %0d, expected 8192", wrap16(p1 - pm0)));
    check(freq_shift == 0, "open loop: freq shift not zero after step");

    // ---- B: closed loop on an external sine ----
    kp = 24'sd1048576;   // 4096 tuning-word LSB per phase LSB
    ki = 24'sd16384;     // 64 per phase LSB per clock: critically damped
    adc_modulation = '0;
    ext_on = 1'b1; f_in = F0 + 50.0e3;
    repeat (5) @(posedge clk);
    #1 loopback = 1'b0; loop_enable = 1'b1;
    exp_dw = 50.0e3 / F_CLK_HZ * 4294967296.0;
    t_lock = -1;
    for (int i = 0; i < 6000; i++) begin
      @(posedge clk); #1;
      if (t_lock < 0 && fabs(real'(freq_shift) - exp_dw) < 0.01 * exp_dw) t_lock = i;
    end
    mean_dw(2000, m);
    check(fabs(m - exp_dw) < 0.002 * exp_dw, $sformatf("+50 kHz: mean dw %f, expected %f", m, exp_dw));
    check(t_lock >= 0 && t_lock < 2000, $sformatf("+50 kHz: lock time %0d clocks", t_lock));
    $display("external +50 kHz: dw = %f (%f Hz), first within 1%% after %0d clocks", m,
             m * F_CLK_HZ / 4294967296.0, t_lock);
    a_exp = 30000.0 * 32767.0 / 128.0 / 2.0 / $sqrt(1.0 + $pow(2.3 / 6.05, 4));
    check(fabs(real'(amplitude) - a_exp) < 0.02 * a_exp,
          $sformatf("closed loop amplitude %0d, expected %f", amplitude, a_exp));
    f_in = F0 - 30.0e3;
    exp_dw = -30.0e3 / F_CLK_HZ * 4294967296.0;
    repeat (6000) @(posedge clk);
    mean_dw(2000, m);
    check(fabs(m - exp_dw) < 0.002 * fabs(exp_dw), $sformatf("-30 kHz: mean dw %f, expected %f", m, exp_dw));
    $display("external -30 kHz: dw = %f (%f Hz)", m, m * F_CLK_HZ / 4294967296.0);

    // ---- C: closed loop, loopback, phase modulation ----
    loop_enable = 1'b0; loopback = 1'b1; ext_on = 1'b0;
    kp = '0; ki = 24'sd2048;                    // 8 per phase LSB per clock
    adc_modulation = sample_t'(-pm0);           // start near lock
    repeat (500) @(posedge clk);
    #1 loop_enable = 1'b1;
    repeat (8000) @(posedge clk);
    mean_dw(1000, dw0);
    begin
      real sp;
      sp = 0.0;
      for (int i = 0; i < 1000; i++) begin @(posedge clk); #1 sp += real'(phase); end
      check(fabs(sp / 1000.0) < 1.0, $sformatf("loopback lock: mean phase %f", sp / 1000.0));
    end
    adc_modulation = sample_t'(-pm0 + 256);
    repeat (8000) @(posedge clk);
    mean_dw(1000, m);
    // latency of the loop: 22 clocks plus the HPF group delay at 6 MHz
    exp_dw = 256.0 * 65536.0 / 22.2;
    check(fabs((m - dw0) - exp_dw) < 0.05 * exp_dw,
          $sformatf("phase modulation step: dw change %f, expected %f", m - dw0, exp_dw));
    $display("loopback phase step: dw change %f (L = %f clocks)", m - dw0, 256.0 * 65536.0 / (m - dw0));

    check(n_open > 0 && n_closed > 0 && n_loopback > 0 && n_external > 0 && n_phase_mod > 0,
          "a mode was never used");
    $display("clocks: open %0d closed %0d loopback %0d external %0d phase-mod %0d",
             n_open, n_closed, n_loopback, n_external, n_phase_mod);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
