// hpf_biquad: second-order Butterworth high-pass filter of the S-PLL phase
// detector (one per quadrature branch).
//
// After mixing, each branch carries the wanted component at (w + w0), close
// to 2*w0, and an unwanted one near dc. Because the unwanted part always
// sits near dc, a high-pass filter removes it while adding almost no delay
// at the 2*w0 pass band, which is what keeps the phase detector fast.
// The filter is the direct-form-I section
//   y[n] = b0*(x[n] - 2x[n-1] + x[n-2]) - a1*y[n-1] - a2*y[n-2]
// with run-time coefficients (Butterworth values come from
// spll_pkg::butter_hpf), so the cut-off can follow the cantilever used.
// The output state keeps GUARD extra fraction bits to keep rounding noise
// low at low cut-offs; the output is rounded and saturated to W bits.
//
// Interface: x_i, y_o signed W-bit; coef holds b0, a1, a2 with COEF_FRAC
// fraction bits. Timing: one clock from x_i to y_o. Synchronous reset
// clears the state. The filter type and order follow the published S-PLL; the
// structure, widths and coefficient format are this design's choice.
module hpf_biquad
  import spll_pkg::*;
#(
  parameter int W     = FILT_W,
  parameter int GUARD = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  hpf_coef_t           coef,
  input  logic signed [W-1:0] x_i,
  output logic signed [W-1:0] y_o
);

  localparam int SW = W + GUARD;                // state width
  localparam int AW = SW + COEF_W + 3;          // accumulator width

  logic signed [W-1:0]  x1, x2;
  logic signed [SW-1:0] y1, y2;
  logic signed [W+1:0]  xd;                     // x - 2x1 + x2
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] ynew;                   // Q(GUARD)
  logic signed [SW-1:0] ynext;

  localparam logic signed [AW-1:0] SMAX = AW'((64'sd1 <<< (SW - 1)) - 1);
  localparam logic signed [AW-1:0] SMIN = -AW'(64'sd1 <<< (SW - 1));

  always_comb begin
    xd   = (W+2)'(x_i) - ((W+2)'(x1) <<< 1) + (W+2)'(x2);
    acc  = ((AW'(coef.b0) * AW'(xd)) <<< GUARD)
         - AW'(coef.a1) * AW'(y1)
         - AW'(coef.a2) * AW'(y2);
    ynew = (acc + (AW'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if      (ynew > SMAX) ynext = SMAX[SW-1:0];
    else if (ynew < SMIN) ynext = SMIN[SW-1:0];
    else                  ynext = ynew[SW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0;
    end else begin
      x1 <= x_i;
      x2 <= x1;
      y1 <= ynext;
      y2 <= y1;
    end
  end

  // Output: state rounded to W bits, saturated.
  logic signed [SW:0] yr;
  assign yr = ((SW+1)'(y1) + (SW+1)'(1 <<< (GUARD - 1))) >>> GUARD;
  always_comb begin
    if      (yr > (SW+1)'((1 <<< (W - 1)) - 1)) y_o = {1'b0, {(W-1){1'b1}}};
    else if (yr < -(SW+1)'(1 <<< (W - 1)))      y_o = {1'b1, {(W-1){1'b0}}};
    else                                        y_o = yr[W-1:0];
  end

endmodule
