// phase_vco: phase-output VCO (phi-VCO) of the S-PLL.
//
// A numerically controlled oscillator that outputs its phase instead of a
// sine wave, as the phi-VCO of the published S-PLL does: the phase advances every clock
// by centre_ftw + offset_ftw, so the output frequency moves in proportion
// to the control input offset_ftw around the free-running frequency set by
// centre_ftw (w0 or 2*w0 in the published block diagram).
//
// Interface: centre_ftw is unsigned, offset_ftw signed (both in turns/2^ACC_W
// per clock), phase is the accumulator value (one turn = 2^ACC_W).
// Timing: a registered accumulator; a change of the inputs changes the
// phase increment seen at phase on the next clock edge. Synchronous reset
// clears the phase to 0. The accumulator form and its width are this
// design's choice; the published design gives only the block's function.
module phase_vco
  import spll_pkg::*;
#(
  parameter int W = ACC_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [W-1:0]        centre_ftw,
  input  logic signed [W-1:0] offset_ftw,
  output logic [W-1:0]        phase
);

  logic [W-1:0] step;
  assign step = centre_ftw + $unsigned(offset_ftw);   // modulo 2^W

  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= phase + step;
  end

endmodule
