// quad_mixer: the two multipliers at the input of the S-PLL phase detector.
//
// The deflection signal A*cos(w t + phi) is multiplied by the reference
// pair cos(w0 t) and sin(w0 t). Each product holds a sum-frequency term at
// (w + w0) and a difference term near dc; the high-pass filters that follow
// keep only the sum term, whose phase the CORDIC then measures.
//
// Interface: all inputs are signed Q(IN_W-1) samples; the outputs are the
// products rescaled to OUT_W bits (product bits [2*IN_W-2 -: OUT_W], so a
// full-scale times full-scale product maps to just under full scale).
// Timing: one register stage. The multiplication follows the published S-PLL;
// the widths and the rescaling are this design's choice.
module quad_mixer
  import spll_pkg::*;
#(
  parameter int IN_W  = SAMPLE_W,
  parameter int OUT_W = FILT_W
) (
  input  logic                    clk,
  input  logic signed [IN_W-1:0]  sig_i,
  input  logic signed [IN_W-1:0]  ref_cos,
  input  logic signed [IN_W-1:0]  ref_sin,
  output logic signed [OUT_W-1:0] x_o,
  output logic signed [OUT_W-1:0] y_o
);

  logic signed [2*IN_W-1:0] px, py;
  assign px = sig_i * ref_cos;
  assign py = sig_i * ref_sin;

  always_ff @(posedge clk) begin
    x_o <= px[2*IN_W-2 -: OUT_W];
    y_o <= py[2*IN_W-2 -: OUT_W];
  end

endmodule
