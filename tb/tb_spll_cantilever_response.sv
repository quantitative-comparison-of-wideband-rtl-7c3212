// tb_spll_cantilever_response: frequency response of the S-PLL with the
// excitation loop closed through a modelled cantilever, as measured on a
// real FM-AFM with a phase modulation phi_m added to the excitation phase.
// Cases: ultra-short cantilever (f0 = 3.44 MHz, Q = 7) and standard one
// (f0 = 151.46 kHz, Q = 9), each with two loop gains.
//  1. The loop is locked at resonance (phase offset calibrated open loop,
//     as in tb_spll_with_cantilever).
//  2. phi_m = P sin(2 pi fm t) is added. The loop holds the total phase,
//     so at low fm the frequency shift follows phi_m with the gain
//        g0 = P * 2^16 / (Sc + Sd)   (tuning-word units)
//     where Sc = Q*fs/(pi*f0) clocks is the cantilever's phase slope and
//     Sd the loop delay (detector plus converter model). This gain is
//     checked within 10 % at a modulation far inside the bandwidth.
//  3. fm is swept upwards in 1.25x steps until the response falls 3 dB
//     below g0; the bandwidth is reported and must lie above the lowest
//     modulation frequency swept. The cantilever acts on phase changes like
//     a first-order low-pass with a time constant of Sc clocks, so the
//     bandwidth falls with Q/f0.
module tb_spll_cantilever_response;
  import spll_pkg::*;

  localparam int  DELAY = 10;
  localparam real P     = 512.0;                // modulation amplitude, phase LSB

  logic clk = 1'b0, rst = 1'b1;
  acc_t f0_ftw;
  hpf_coef_t hpf_coef;
  gain_t kp, ki;
  logic loop_enable, loopback;
  sample_t adc_modulation, dac_excitation, defl_usc, defl_nch, defl;
  ftw_t freq_shift;
  logic signed [PHASE_W-1:0] phase;
  logic [FILT_W-1:0] amplitude;
  logic lf_sat;
  logic use_nch = 1'b0;
  int checks = 0, failures = 0;

  real fm = 0.0, pm = 0.0, g0 = 1.0;
  int offset = 0;

  spll_top dut (
    .clk, .rst, .f0_ftw, .hpf_coef, .kp, .ki, .loop_enable, .loopback,
    .adc_deflection(defl), .adc_modulation, .dac_excitation,
    .freq_shift_o(freq_shift), .phase_o(phase), .amplitude_o(amplitude),
    .lf_sat_o(lf_sat)
  );

  cantilever_model #(.Q(7.0), .DELAY(DELAY)) u_usc (
    .clk, .rst, .f0_hz(3.44e6), .drive(dac_excitation), .deflection(defl_usc)
  );
  cantilever_model #(.Q(9.0), .DELAY(DELAY)) u_nch (
    .clk, .rst, .f0_hz(151.46e3), .drive(dac_excitation), .deflection(defl_nch)
  );
  assign defl = use_nch ? defl_nch : defl_usc;

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

  function automatic int wrap16(input int v);
    int r;
    r = ((v % 65536) + 65536) % 65536;
    return r >= 32768 ? r - 65536 : r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic mean_phase(input int n, output int mp);
    int first;
    real acc;
    @(posedge clk); #1 first = phase; acc = 0.0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1 acc += real'(wrap16(int'(phase) - first));
    end
    mp = first + $rtoi(acc / real'(n));
  endtask

  // Amplitude of freq_shift at fm, by correlation over whole periods.
  task automatic lockin(input int periods, output real amp);
    real si, co, v, ang, mean;
    int n;
    n = $rtoi(real'(periods) * F_CLK_HZ / fm + 0.5);
    mean = 0.0;
    for (int i = 0; i < n; i++) begin @(posedge clk); #1 mean += real'(freq_shift); end
    mean = mean / real'(n);
    si = 0.0; co = 0.0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      v = real'(freq_shift) - mean;
      ang = 2.0 * PI * (pm - fm / F_CLK_HZ);
      si += v * $sin(ang);
      co += v * $cos(ang);
    end
    amp = 2.0 * $sqrt(si * si + co * co) / real'(n);
  endtask

  task automatic run_case(input string name, input bit nch, input real f0, input real q,
                          input real sd, input int settle, input gain_t ki_set,
                          input real fm_lo);
    int pc;
    real amp, g, prev_g, prev_f, f_3db, sc;
    rst = 1'b1; use_nch = nch; fm = 0.0; offset = 0;
    f0_ftw = hz_to_ftw(f0);
    hpf_coef = butter_hpf(0.78 * f0);
    kp = '0; ki = ki_set;
    loop_enable = 1'b0; loopback = 1'b0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    // 1. lock at resonance
    repeat (settle) @(posedge clk);
    mean_phase(2000, pc);
    offset = -pc;
    repeat (settle) @(posedge clk);
    #1 loop_enable = 1'b1;
    repeat (2 * settle) @(posedge clk);

    // 2. low-frequency gain
    sc = q * F_CLK_HZ / (PI * f0);
    g0 = P * 65536.0 / (sc + sd);
    fm = fm_lo; repeat (settle) @(posedge clk);
    lockin(2, amp);
    check(fabs(amp / g0 - 1.0) < 0.1,
          $sformatf("%s, ki %0d: gain %f of P*2^16/(Sc+Sd) at %f Hz", name, ki, amp / g0, fm));
    $display("%s, ki %0d: at %f Hz gain %f of P*2^16/(Sc+Sd) (Sc %f, Sd %f clocks)",
             name, ki, fm, amp / g0, sc, sd);

    // 3. bandwidth
    prev_g = amp / g0; prev_f = fm_lo;
    f_3db = -1.0;
    for (real f = 2.0 * fm_lo; f < 2.0e6 && f_3db < 0.0; f = f * 1.25) begin
      fm = f; repeat (3000) @(posedge clk);
      lockin(4, amp);
      g = amp / g0;
      if (g < 0.7071) f_3db = prev_f + (f - prev_f) * (prev_g - 0.7071) / (prev_g - g);
      prev_g = g; prev_f = f;
    end
    check(f_3db > fm_lo, $sformatf("%s, ki %0d: no -3 dB point found", name, ki));
    $display("%s, ki %0d: PLL -3 dB bandwidth with the cantilever %f Hz", name, ki, f_3db);
  endtask

  initial begin
    loop_enable = 1'b0; loopback = 1'b0;
    kp = '0; ki = '0; f0_ftw = '0; hpf_coef = '0;
    run_case("ultra-short cantilever", 1'b0, 3.44e6, 7.0, 22.6 + DELAY + 1.0, 6000, 24'sd128, 500.0);
    run_case("ultra-short cantilever", 1'b0, 3.44e6, 7.0, 22.6 + DELAY + 1.0, 6000, 24'sd1024, 2000.0);
    run_case("standard cantilever", 1'b1, 151.46e3, 9.0, 54.0 + DELAY + 1.0, 60000, 24'sd4, 500.0);
    run_case("standard cantilever", 1'b1, 151.46e3, 9.0, 54.0 + DELAY + 1.0, 60000, 24'sd16, 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
