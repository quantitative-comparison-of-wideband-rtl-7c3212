// cordic_vectoring: Cartesian-to-polar converter of the S-PLL phase
// detector, R = sqrt(X^2 + Y^2) and theta = atan2(Y, X), by the CORDIC
// algorithm in vectoring mode.
//
// X and Y carry FG extra fraction bits inside, so that short vectors keep
// their angular resolution. Stage 0 turns the vector into the right half plane by +/-90 degrees.
// Each of the ITER following stages turns it by +/-atan(2^-i), with the
// sign chosen to drive Y towards zero, and adds the matching angle to Z;
// afterwards Z is the angle and X the length times the CORDIC gain
// (about 1.6468), which a final constant multiplication removes.
// The arctangent constants are computed at elaboration.
//
// Interface: x_i, y_i signed IN_W bits; mag_o unsigned IN_W bits (the
// length, saturated); phase_o is theta in turns/2^PHASE_OUT_W (signed
// reading is -pi..+pi). Timing: fully pipelined, one result per clock,
// LATENCY = ITER + 2 clocks. That the converter is a CORDIC is the
// published S-PLL's; the pipeline, iteration count and widths are this design's.
module cordic_vectoring
  import spll_pkg::*;
#(
  parameter int IN_W        = FILT_W,
  parameter int PHASE_OUT_W = PHASE_W,
  parameter int ITER        = 16
) (
  input  logic                   clk,
  input  logic signed [IN_W-1:0] x_i,
  input  logic signed [IN_W-1:0] y_i,
  output logic [IN_W-1:0]        mag_o,
  output logic [PHASE_OUT_W-1:0] phase_o
);

  localparam int LATENCY = ITER + 2;
  localparam int FG = 8;                        // fraction guard bits
  localparam int XW = IN_W + 3 + FG;            // room for sqrt(2)*gain
  localparam int ZW = PHASE_OUT_W + 4;          // angle with guard bits
  localparam int KW = 18;                       // 1/gain constant width

  function automatic logic [ITER*ZW-1:0] build_atan();
    logic [ITER*ZW-1:0] t;
    for (int i = 0; i < ITER; i++)
      t[i*ZW +: ZW] = ZW'($rtoi($atan(1.0 / real'(64'd1 << i)) / (2.0 * PI)
                                * real'(64'd1 << ZW) + 0.5));
    return t;
  endfunction
  localparam logic [ITER*ZW-1:0] ATAN = build_atan();

  function automatic real cordic_gain();
    real g;
    g = 1.0;
    for (int i = 0; i < ITER; i++) g = g * $sqrt(1.0 + 1.0 / real'(64'd1 << (2 * i)));
    return g;
  endfunction
  localparam logic [KW-1:0] INV_GAIN =
    KW'($rtoi(real'(64'd1 << KW) / cordic_gain() + 0.5));

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic        [ZW-1:0] zs [ITER+1];

  // Stage 0: rotate into the right half plane.
  always_ff @(posedge clk) begin
    if (x_i >= 0) begin
      xs[0] <= XW'(x_i) <<< FG;
      ys[0] <= XW'(y_i) <<< FG;
      zs[0] <= '0;
    end else if (y_i >= 0) begin                // turn by -90 degrees
      xs[0] <= XW'(y_i) <<< FG;
      ys[0] <= -(XW'(x_i) <<< FG);
      zs[0] <= ZW'(1) << (ZW - 2);              // +90 degrees
    end else begin                              // turn by +90 degrees
      xs[0] <= -(XW'(y_i) <<< FG);
      ys[0] <= XW'(x_i) <<< FG;
      zs[0] <= ZW'(3) << (ZW - 2);              // -90 degrees
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (ys[i] >= 0) begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + ATAN[i*ZW +: ZW];
      end else begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - ATAN[i*ZW +: ZW];
      end
    end
  end

  // Gain removal and output rounding.
  logic [XW+KW-1:0] mscaled;
  logic [XW-1:0]    mround;
  assign mscaled = $unsigned(xs[ITER]) * (XW+KW)'(INV_GAIN);
  assign mround  = XW'((mscaled + (XW+KW)'(1 << (KW + FG - 1))) >> (KW + FG));

  always_ff @(posedge clk) begin
    mag_o   <= (mround > XW'({IN_W{1'b1}})) ? {IN_W{1'b1}} : mround[IN_W-1:0];
    phase_o <= PHASE_OUT_W'((zs[ITER] + ZW'(1 << (ZW - PHASE_OUT_W - 1))) >> (ZW - PHASE_OUT_W));
  end

endmodule
