// tb_spll_with_cantilever: the S-PLL closing the excitation loop through a
// modelled cantilever, as in FM-AFM, for an ultra-short cantilever
// (f0 = 3.44 MHz, Q = 7) and a standard one (f0 = 151.46 kHz, Q = 9).
// For each:
//  1. Open loop, drive at f0: the phase read at phase_o is fed back as a
//     phase-modulation offset, so that phi = 0 means "driven at resonance".
//  2. Loop closed: the frequency shift must stay near zero (at resonance)
//     and the cantilever amplitude must be at its resonant peak.
//  3. The resonance is moved by df (as a tip-sample force would). The loop
//     must follow: the new drive frequency satisfies
//        cantilever phase slope * (f - f0') = total delay * (f - f0),
//     so dw = df * Sc / (Sc + Sd), with Sc = Q*fs/(pi*f0) clocks the
//     cantilever phase slope and Sd the loop delay in clocks (detector
//     22.6 + converter model). Checked within 10 %.
module tb_spll_with_cantilever;
  import spll_pkg::*;

  localparam int DELAY = 10;

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
  real f_res_usc = 3.44e6, f_res_nch = 151.46e3;
  logic use_nch = 1'b0;
  int checks = 0, failures = 0;

  spll_top dut (
    .clk, .rst, .f0_ftw, .hpf_coef, .kp, .ki, .loop_enable, .loopback,
    .adc_deflection(defl), .adc_modulation, .dac_excitation,
    .freq_shift_o(freq_shift), .phase_o(phase), .amplitude_o(amplitude),
    .lf_sat_o(lf_sat)
  );

  cantilever_model #(.Q(7.0), .DELAY(DELAY)) u_usc (
    .clk, .rst, .f0_hz(f_res_usc), .drive(dac_excitation), .deflection(defl_usc)
  );
  cantilever_model #(.Q(9.0), .DELAY(DELAY)) u_nch (
    .clk, .rst, .f0_hz(f_res_nch), .drive(dac_excitation), .deflection(defl_nch)
  );
  assign defl = use_nch ? defl_nch : defl_usc;

  always #5 clk = ~clk;

  initial begin
    repeat (1500000) @(posedge clk);
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

  task automatic mean_hz(input int n, output real m);
    real s;
    s = 0.0;
    for (int i = 0; i < n; i++) begin @(posedge clk); #1 s += real'(freq_shift); end
    m = s / real'(n) * F_CLK_HZ / 4294967296.0;
  endtask

  task automatic run_case(input string name, input bit nch, input real f0, input real q,
                          input real df, input int settle, input gain_t ki_set);
    int pc;
    real m0, m1, sc, sd, exp_df;
    rst = 1'b1; use_nch = nch;
    f_res_usc = 3.44e6; f_res_nch = 151.46e3;
    f0_ftw = hz_to_ftw(f0);
    hpf_coef = butter_hpf(0.78 * f0);
    kp = '0; ki = ki_set;
    loop_enable = 1'b0; loopback = 1'b0; adc_modulation = '0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    // 1. open loop at f0: calibrate the phase offset
    repeat (settle) @(posedge clk);
    mean_phase(2000, pc);
    adc_modulation = sample_t'(-pc);
    repeat (settle) @(posedge clk);
    // 2. closed loop: stays at resonance
    #1 loop_enable = 1'b1;
    repeat (2 * settle) @(posedge clk);
    mean_hz(2000, m0);
    check(fabs(m0) < 0.01 * f0 / (2.0 * q),
          $sformatf("%s: locked %f Hz away from resonance", name, m0));
    check(real'(amplitude) > 0.95 * 20000.0 * 32767.0 / 256.0 * 0.98,
          $sformatf("%s: amplitude %0d below the resonant peak", name, amplitude));
    // 3. resonance shift
    if (nch) f_res_nch = f0 + df; else f_res_usc = f0 + df;
    repeat (3 * settle) @(posedge clk);
    mean_hz(4000, m1);
    sc = q * F_CLK_HZ / (PI * f0);
    sd = 22.6 + real'(DELAY) + 1.0;
    exp_df = df * sc / (sc + sd);
    check(fabs((m1 - m0) - exp_df) < 0.1 * fabs(exp_df),
          $sformatf("%s: shift %f Hz for resonance shift %f Hz, expected %f Hz", name, m1 - m0, df, exp_df));
    $display("%s: at resonance %f Hz; resonance +%f Hz -> shift %f Hz (expected %f); amplitude %0d",
             name, m0, df, m1 - m0, exp_df, amplitude);
  endtask

  initial begin
    loop_enable = 1'b0; loopback = 1'b0; adc_modulation = '0;
    kp = '0; ki = '0; f0_ftw = '0; hpf_coef = '0;
    run_case("ultra-short cantilever", 1'b0, 3.44e6, 7.0, 10.0e3, 6000, 24'sd128);
    run_case("standard cantilever", 1'b1, 151.46e3, 9.0, 200.0, 60000, 24'sd4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
