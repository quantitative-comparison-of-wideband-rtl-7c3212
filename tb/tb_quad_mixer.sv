// tb_quad_mixer: random samples through both multipliers; each output is
// compared with the product computed in 64-bit arithmetic and divided by
// 2^7 (flooring), one clock later.
module tb_quad_mixer;
  import spll_pkg::*;

  logic clk = 1'b0;
  sample_t sig, rc, rs;
  logic signed [FILT_W-1:0] x, y;
  longint ex, ey;
  int checks = 0, failures = 0;

  quad_mixer dut (.clk, .sig_i(sig), .ref_cos(rc), .ref_sin(rs), .x_o(x), .y_o(y));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      sig = $urandom; rc = $urandom; rs = $urandom;
      if (rc == -32768) rc = -32767;
      if (rs == -32768) rs = -32767;
      if (n == 0) begin sig = 32767; rc = 32767; rs = -32767; end
      ex = (longint'(sig) * longint'(rc)); ex = (ex - ((ex % 128 + 128) % 128)) / 128;
      ey = (longint'(sig) * longint'(rs)); ey = (ey - ((ey % 128 + 128) % 128)) / 128;
      @(posedge clk); #1;
      checks++;
      if (longint'(x) != ex || longint'(y) != ey) begin
        failures++;
        if (failures < 10) $display("%0d*%0d/%0d: x=%0d (%0d) y=%0d (%0d)", sig, rc, rs, x, ex, y, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
