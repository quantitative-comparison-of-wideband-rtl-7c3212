// tb_sincos_lut: compares the sine/cosine converter with the math library
// over every table address and random phases, checks the one-clock
// latency and the quadrant symmetries.
module tb_sincos_lut;
  import spll_pkg::*;

  localparam real AMP = 32767.0;
  logic clk = 1'b0;
  acc_t phase;
  sample_t s, c;
  int checks = 0, failures = 0;

  sincos_lut dut (.clk, .phase, .sin_o(s), .cos_o(c));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Tolerance: the 12-bit address quantises the phase to +/-half a step
  // around the step centre (pi/4096 rad), i.e. up to ~26 LSB, plus rounding.
  task automatic check(input acc_t ph);
    real ang, es, ec;
    phase = ph;
    @(posedge clk); #1;
    ang = real'(ph) / 4294967296.0 * 2.0 * PI;
    es = $sin(ang) * AMP; ec = $cos(ang) * AMP;
    checks++;
    if ((real'(s) - es) > 27.0 || (es - real'(s)) > 27.0 ||
        (real'(c) - ec) > 27.0 || (ec - real'(c)) > 27.0) begin
      failures++;
      if (failures < 10) $display("ph=%h sin=%0d (%f) cos=%0d (%f)", ph, s, es, c, ec);
    end
  endtask

  initial begin
    for (int a = 0; a < 4096; a++) check({a[11:0], 20'h80000});
    for (int n = 0; n < 4000; n++) check($urandom);
    // Symmetry: sin(-x) = -sin(x) at step centres
    begin
      sample_t s1;
      for (int a = 0; a < 1024; a++) begin
        phase = {a[11:0], 20'h80000}; @(posedge clk); #1 s1 = s;
        phase = {~a[11:0], 20'h80000}; @(posedge clk); #1;
        checks++;
        if (s !== -s1) begin failures++; $display("symmetry a=%0d %0d %0d", a, s1, s); end
      end
    end
    // Latency: output must change exactly one clock after the input.
    phase = 32'h0000_0000; @(posedge clk); @(posedge clk);
    #1 phase = 32'h4000_0000;     // sin 90 degrees
    @(posedge clk); #1;
    checks++;
    if (s < 32700) begin failures++; $display("latency: s=%0d", s); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
