// tb_phase_vco: checks the phi-VCO against a reference accumulator kept in
// the testbench, over random centre and offset words that change while it
// runs, including negative offsets and wrap-around, and checks reset.
module tb_phase_vco;
  import spll_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  acc_t centre, phase;
  ftw_t offset;
  longint unsigned model;
  int checks = 0, failures = 0;

  phase_vco dut (.clk, .rst, .centre_ftw(centre), .offset_ftw(offset), .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    centre = 32'h7AE1_47AE; offset = '0;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (phase !== '0) begin failures++; $display("reset: phase=%h", phase); end
    rst = 1'b0;
    model = 0;
    for (int n = 0; n < 5000; n++) begin
      if (n % 100 == 0) begin
        centre = $urandom;
        offset = $signed($urandom) >>> ($urandom_range(0, 20));
      end
      @(posedge clk);
      model = (model + longint'(centre) + longint'(offset)) & 64'hFFFF_FFFF;
      #1 checks++;
      if (phase !== model[31:0]) begin
        failures++;
        if (failures < 10) $display("n=%0d phase=%h model=%h", n, phase, model[31:0]);
      end
    end
    // Output frequency: a 3 MHz word wraps 3000 times in 1e6 clocks; here
    // count wraps over 10000 clocks (expected 300).
    begin
      int wraps = 0;
      acc_t prev;
      centre = hz_to_ftw(3.0e6); offset = '0;
      @(posedge clk); #1 prev = phase;
      for (int n = 0; n < 10000; n++) begin
        @(posedge clk); #1;
        if (phase < prev) wraps++;
        prev = phase;
      end
      checks++;
      if (wraps < 299 || wraps > 301) begin failures++; $display("wraps=%0d", wraps); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
