// loop_filter: proportional-integral loop filter (LF) of the S-PLL.
//
// The LF turns the phase error phi into the frequency shift dw that steers
// the phi-VCO, so that phi is held constant; dw is also the PLL's
// frequency-shift output. With gains kp and ki (GAIN_FRAC fraction bits):
//   I[n+1] = I[n] + ki*phi[n]          (saturating, anti-windup)
//   dw[n]  = (I[n] + kp*phi[n]) >> GAIN_FRAC, saturated to OUT_W bits.
// phi is in turns/2^PHASE_W, dw in tuning-word units (turns/2^ACC_W per
// clock). clear empties the integrator (used while the loop is open).
// sat_o is high in a cycle where the integrator or the output clipped.
//
// Timing: dw_o is registered, one clock after phi_i. Synchronous reset
// clears integrator and output. That the LF is a PI controller is the
// published S-PLL's; the fixed-point format and the saturation are this design's.
module loop_filter
  import spll_pkg::*;
#(
  parameter int IN_W  = PHASE_W,
  parameter int OUT_W = ACC_W,
  parameter int GW    = GAIN_W,
  parameter int FRAC  = GAIN_FRAC
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clear,
  input  logic signed [GW-1:0]    kp,
  input  logic signed [GW-1:0]    ki,
  input  logic signed [IN_W-1:0]  phi_i,
  output logic signed [OUT_W-1:0] dw_o,
  output logic                    sat_o
);

  localparam int IW = OUT_W + FRAC;             // integrator width
  localparam int SW = IW + 2;                   // sum width

  localparam logic signed [SW-1:0] IMAX = SW'((65'sd1 <<< (IW - 1)) - 1);
  localparam logic signed [SW-1:0] IMIN = -SW'(65'sd1 <<< (IW - 1));

  logic signed [IN_W+GW-1:0] p_term, i_step;
  logic signed [IW-1:0]      integ;
  logic signed [SW-1:0]      i_sum, o_sum, o_shift;
  logic signed [IW-1:0]      i_next;
  logic signed [OUT_W-1:0]   o_next;
  logic                      i_sat, o_sat;

  assign p_term = phi_i * kp;
  assign i_step = phi_i * ki;

  always_comb begin
    i_sum = SW'(integ) + SW'(i_step);
    i_sat = (i_sum > IMAX) || (i_sum < IMIN);
    if      (i_sum > IMAX) i_next = IMAX[IW-1:0];
    else if (i_sum < IMIN) i_next = IMIN[IW-1:0];
    else                   i_next = i_sum[IW-1:0];

    o_sum   = SW'(integ) + SW'(p_term);
    o_shift = o_sum >>> FRAC;
    o_sat   = (o_shift > SW'((65'sd1 <<< (OUT_W - 1)) - 1)) ||
              (o_shift < -SW'(65'sd1 <<< (OUT_W - 1)));
    if      (o_shift > SW'((65'sd1 <<< (OUT_W - 1)) - 1)) o_next = {1'b0, {(OUT_W-1){1'b1}}};
    else if (o_shift < -SW'(65'sd1 <<< (OUT_W - 1)))      o_next = {1'b1, {(OUT_W-1){1'b0}}};
    else                                                  o_next = o_shift[OUT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      integ <= '0;
      dw_o  <= '0;
      sat_o <= 1'b0;
    end else begin
      integ <= i_next;
      dw_o  <= o_next;
      sat_o <= i_sat || o_sat;
    end
  end

endmodule
