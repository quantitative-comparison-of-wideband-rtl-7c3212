// tb_phase_comparator: random measured and reference phases, including
// differences across the +/-pi wrap; phi must equal the wrapped
// difference of the measured phase and the rounded top 16 bits of the
// reference, one clock later. Also checks reset.
module tb_phase_comparator;
  import spll_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  phase_t meas;
  acc_t vco;
  logic signed [PHASE_W-1:0] phi;
  int checks = 0, failures = 0;

  phase_comparator dut (.clk, .rst, .meas_phase(meas), .vco_phase(vco), .phi_o(phi));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    meas = 16'h1234; vco = 32'h0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (phi !== '0) begin failures++; $display("reset phi=%0d", phi); end
    rst = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      longint d;
      meas = $urandom; vco = $urandom;
      if (n == 0) begin meas = 16'h7FFF; vco = 32'h8000_0000; end
      // expected: measured minus reference (in 1/65536 turn), mapped to -32768..32767
      d = longint'(meas) - ((longint'(vco) + 32768) / 65536);
      d = ((d % 65536) + 65536) % 65536;
      if (d >= 32768) d -= 65536;
      @(posedge clk); #1;
      checks++;
      if (longint'(phi) != d) begin
        failures++;
        if (failures < 10) $display("meas=%h vco=%h phi=%0d exp=%0d", meas, vco, phi, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
