// tb_hpf_biquad: runs the high-pass section against a double-precision
// model of the same Butterworth filter (coefficients from the exact
// bilinear-transform formula, not from the fixed-point words), with
//  * random noise plus a 6 MHz tone (the 2*f0 pass band for f0 = 3 MHz),
//  * a dc step, which must decay to zero,
//  * an impulse, whose first output sample (one clock later) must be b0*x.
// It also checks the pass-band gain at 6 MHz and the stop-band gain at
// 100 kHz against the Butterworth magnitude formula.
module tb_hpf_biquad;
  import spll_pkg::*;

  localparam real FC = 2.3e6;
  logic clk = 1'b0, rst = 1'b1;
  hpf_coef_t coef;
  logic signed [FILT_W-1:0] x, y;
  int checks = 0, failures = 0;
  real k, nrm, rb0, ra1, ra2;
  real mx1, mx2, my1, my2, ym;

  hpf_biquad dut (.clk, .rst, .coef, .x_i(x), .y_o(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Advance one clock with input xv; returns model output for that input.
  task automatic step(input real xv);
    x = FILT_W'($rtoi(xv));
    ym = rb0 * (real'(x) - 2.0 * mx1 + mx2) - ra1 * my1 - ra2 * my2;
    mx2 = mx1; mx1 = real'(x); my2 = my1; my1 = ym;
    @(posedge clk); #1;
  endtask

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic reset_model();
    mx1 = 0; mx2 = 0; my1 = 0; my2 = 0;
  endtask

  // Peak output amplitude of a sine at f (after settling).
  task automatic tone_gain(input real f, output real g);
    real pk;
    pk = 0;
    for (int n = 0; n < 4000; n++) begin
      step(2.0e6 * $sin(2.0 * PI * f / F_CLK_HZ * real'(n)));
      if (n > 2000 && (real'(y) > pk)) pk = real'(y);
    end
    g = pk / 2.0e6;
  endtask

  initial begin
    real g, tol;
    k = $tan(PI * FC / F_CLK_HZ);
    nrm = 1.0 + $sqrt(2.0) * k + k * k;
    rb0 = 1.0 / nrm; ra1 = 2.0 * (k * k - 1.0) / nrm; ra2 = (1.0 - $sqrt(2.0) * k + k * k) / nrm;
    coef = butter_hpf(FC);
    x = '0; reset_model();
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Impulse: first output is b0 * x, one clock after the input.
    step(1.0e6);
    checks++;
    if (fabs(real'(y) - rb0 * 1.0e6) > 2.0) begin failures++; $display("impulse y=%0d exp=%f", y, rb0*1e6); end
    for (int n = 0; n < 200; n++) step(0.0);

    // Noise plus tone, against the model.
    for (int n = 0; n < 4000; n++) begin
      step(3.0e6 * $sin(2.0 * PI * 6.0e6 / F_CLK_HZ * real'(n)) +
           real'($signed($urandom) >>> 10));
      checks++;
      tol = 4.0;
      if (fabs(real'(y) - ym) > tol) begin
        failures++;
        if (failures < 10) $display("n=%0d y=%0d model=%f", n, y, ym);
      end
    end

    // dc step: must decay to zero.
    for (int n = 0; n < 2000; n++) step(4.0e6);
    checks++;
    if (fabs(real'(y)) > 2.0) begin failures++; $display("dc residue y=%0d", y); end

    // Pass band (6 MHz) and stop band (100 kHz) gains.
    tone_gain(6.0e6, g);
    checks++;
    if (fabs(g - 1.0 / $sqrt(1.0 + $pow(FC / 6.0e6, 4))) > 0.01) begin failures++; $display("6 MHz gain %f", g); end
    tone_gain(1.0e5, g);
    checks++;
    if (g > 0.01) begin failures++; $display("100 kHz gain %f", g); end

    // Reset clears the state.
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0; x = '0; @(posedge clk); #1;
    checks++;
    if (y !== '0) begin failures++; $display("after reset y=%0d", y); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
