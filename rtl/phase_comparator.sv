// phase_comparator: subtraction-based phase comparator (PC) of the S-PLL.
//
// The phase detector delivers the phase of the input signal, the phi-VCO
// delivers the phase of the reference; their difference is the phase
// error phi. Both are binary angles, so the subtraction wraps modulo one
// turn by itself and the result, read as signed, lies in -pi..+pi. Unlike
// a multiplying comparator it needs no filter, which keeps the latency
// inside the phase feedback loop at a single register.
//
// Interface: meas_phase is PHASE_W bits; vco_phase is the full ACC_W-bit
// accumulator, of which the top PHASE_W bits are compared. phi_o is signed.
// Timing: one register stage; synchronous reset clears phi_o. The
// subtraction is the published S-PLL's; the register and widths are this design's.
module phase_comparator
  import spll_pkg::*;
#(
  parameter int PW = PHASE_W,
  parameter int VW = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [PW-1:0]        meas_phase,
  input  logic [VW-1:0]        vco_phase,
  output logic signed [PW-1:0] phi_o
);

  logic [PW-1:0] vco_top;
  logic [PW:0]   vco_round;
  // Round the reference phase to PW bits (modulo one turn).
  assign vco_round = {1'b0, vco_phase[VW-1 -: PW]} + (PW+1)'(vco_phase[VW-PW-1]);
  assign vco_top   = vco_round[PW-1:0];

  always_ff @(posedge clk) begin
    if (rst) phi_o <= '0;
    else     phi_o <= $signed(meas_phase - vco_top);
  end

endmodule
