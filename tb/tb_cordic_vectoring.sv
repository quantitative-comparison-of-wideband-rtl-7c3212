// tb_cordic_vectoring: streams random vectors (all four quadrants, small
// and full-scale lengths, the axes) through the converter, one per clock,
// and compares each result, ITER+2 clocks later, with sqrt and atan2
// from the math library.
module tb_cordic_vectoring;
  import spll_pkg::*;

  localparam int ITER = 16;
  localparam int LAT  = ITER + 2;
  localparam int N    = 6000;
  logic clk = 1'b0;
  logic signed [FILT_W-1:0] x, y;
  logic [FILT_W-1:0] mag;
  phase_t ph;
  int checks = 0, failures = 0;
  int xs [N], ys [N];

  cordic_vectoring #(.ITER(ITER)) dut (.clk, .x_i(x), .y_i(y), .mag_o(mag), .phase_o(ph));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    for (int n = 0; n < N; n++) begin
      int sh;
      sh = $urandom_range(0, 14);
      xs[n] = $signed($urandom) >>> (8 + sh);
      ys[n] = $signed($urandom) >>> (8 + sh);
    end
    xs[0] = 8388607; ys[0] = 0;
    xs[1] = 0;       ys[1] = 8388607;
    xs[2] = -8388607; ys[2] = 0;
    xs[3] = 0;       ys[3] = -8388607;
    xs[4] = -8388607; ys[4] = -8388607;
    xs[5] = 8388607; ys[5] = 8388607;
    for (int n = 0; n < N + LAT; n++) begin
      if (n < N) begin x = FILT_W'(xs[n]); y = FILT_W'(ys[n]); end
      @(posedge clk); #1;
      if (n >= LAT - 1 && n - (LAT - 1) < N) begin
        int m;
        real em, ea, da, ang;
        m  = n - (LAT - 1);
        em = $sqrt(real'(xs[m]) * real'(xs[m]) + real'(ys[m]) * real'(ys[m]));
        ea = $atan2(real'(ys[m]), real'(xs[m])) / (2.0 * PI) * 65536.0;
        ang = real'($signed(ph));
        da = ang - ea;
        if (da > 32768.0) da -= 65536.0;
        if (da < -32768.0) da += 65536.0;
        checks++;
        // Length within 4 LSB + 1e-4 relative; angle within 2 LSB, or
        // (tiny vectors) within the angular resolution of the input grid.
        if (fabs(real'(mag) - em) > 4.0 + 1.0e-4 * em ||
            fabs(da) > 2.0 + 65536.0 / (2.0 * PI) * 4.0 / (em + 1.0)) begin
          failures++;
          if (failures < 10) $display("m=%0d x=%0d y=%0d mag=%0d (%f) ph=%0d (%f)", m, xs[m], ys[m], mag, em, $signed(ph), ea);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
