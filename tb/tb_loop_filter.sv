// tb_loop_filter: drives the PI filter with random phase errors and gains
// and compares dw with a 64-bit model of I[n+1] = I[n] + ki*phi and
// dw = (I + kp*phi) / 2^8 (floor), then drives it into integrator and
// output saturation, checks that the flag rises and dw clips at the
// largest tuning word, and that clear empties the integrator.
module tb_loop_filter;
  import spll_pkg::*;

  logic clk = 1'b0, rst = 1'b1, clear = 1'b0;
  gain_t kp, ki;
  logic signed [PHASE_W-1:0] phi;
  ftw_t dw;
  logic sat;
  int checks = 0, failures = 0, sat_seen = 0;
  longint integ, o;
  localparam longint IMAX = (longint'(1) <<< 39) - 1;
  localparam longint OMAX = (longint'(1) <<< 31) - 1;

  loop_filter dut (.clk, .rst, .clear, .kp, .ki, .phi_i(phi), .dw_o(dw), .sat_o(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clip(input longint v, input longint mx);
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  function automatic longint floor_div(input longint v, input longint d);
    longint q;
    q = v / d;
    if ((v % d) != 0 && v < 0) q -= 1;
    return q;
  endfunction

  task automatic step_check();
    o = clip(floor_div(integ + longint'(phi) * longint'(kp), 256), OMAX);
    integ = clip(integ + longint'(phi) * longint'(ki), IMAX);
    @(posedge clk); #1;
    checks++;
    if (sat) sat_seen++;
    if (longint'(dw) != o) begin
      failures++;
      if (failures < 10) $display("phi=%0d kp=%0d ki=%0d dw=%0d exp=%0d", phi, kp, ki, dw, o);
    end
  endtask

  initial begin
    kp = 24'sd1000; ki = 24'sd10; phi = 16'sd100;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (dw !== '0) begin failures++; $display("reset dw=%0d", dw); end
    rst = 1'b0; integ = 0;
    for (int n = 0; n < 3000; n++) begin
      if (n % 50 == 0) begin kp = $signed($urandom) >>> 12; ki = $signed($urandom) >>> 16; end
      phi = $urandom;
      step_check();
    end
    // Drive into saturation: large positive error and gains.
    kp = 24'sd8388607; ki = 24'sd8388607; phi = 16'sd32767;
    sat_seen = 0;
    for (int n = 0; n < 2000; n++) step_check();
    checks++;
    if (sat_seen == 0 || dw != ftw_t'(OMAX)) begin failures++; $display("no saturation: dw=%0d", dw); end
    // Leaving saturation: the integrator was clipped, so a negative error
    // must pull dw down at once (anti-windup).
    phi = -16'sd32768;
    for (int n = 0; n < 200; n++) step_check();
    checks++;
    if (dw >= 0) begin failures++; $display("windup: dw=%0d", dw); end
    // Clear
    clear = 1'b1; @(posedge clk); #1 clear = 1'b0; integ = 0;
    checks++;
    if (dw !== '0) begin failures++; $display("clear dw=%0d", dw); end
    kp = 24'sd256; ki = 24'sd0; phi = 16'sd5;
    step_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
