// sincos_lut: phase-to-sine/cosine converter (the "sin/cos" and "cos"
// boxes of the S-PLL).
//
// The top ADDR_W bits of the phase word address a quarter-wave table of
// 2^(ADDR_W-2) sine values, taken at the middle of each phase step
// (sin((i+0.5)*pi/2/N)), so the other three quadrants follow exactly by
// mirroring the address and negating the value. The cosine is the sine of
// the phase plus a quarter turn. The table is computed at elaboration from
// that formula and scaled to +/-(2^(OUT_W-1)-1).
//
// Interface: phase in turns/2^PHASE_IN_W, unsigned; sin_o/cos_o signed.
// Timing: one register stage, outputs valid one clock after the phase.
// The published design names the converters but not their construction: table
// size, widths and the quarter-wave scheme are this design's choices.
module sincos_lut
  import spll_pkg::*;
#(
  parameter int PHASE_IN_W = ACC_W,
  parameter int ADDR_W     = 12,
  parameter int OUT_W      = SAMPLE_W
) (
  input  logic                    clk,
  input  logic [PHASE_IN_W-1:0]   phase,
  output logic signed [OUT_W-1:0] sin_o,
  output logic signed [OUT_W-1:0] cos_o
);

  localparam int QA = ADDR_W - 2;          // quarter-table address bits
  localparam int QN = 1 << QA;             // quarter-table entries

  function automatic logic [QN*OUT_W-1:0] build_table();
    logic [QN*OUT_W-1:0] t;
    real amp;
    amp = real'((64'd1 << (OUT_W - 1)) - 1);
    for (int i = 0; i < QN; i++)
      t[i*OUT_W +: OUT_W] =
        OUT_W'($rtoi($sin((real'(i) + 0.5) * PI / 2.0 / real'(QN)) * amp + 0.5));
    return t;
  endfunction

  localparam logic [QN*OUT_W-1:0] QTABLE = build_table();

  function automatic logic signed [OUT_W-1:0] lookup(input logic [ADDR_W-1:0] a);
    logic [1:0]    quad;
    logic [QA-1:0] idx;
    logic signed [OUT_W-1:0] v;
    quad = a[ADDR_W-1 -: 2];
    idx  = quad[0] ? ~a[QA-1:0] : a[QA-1:0];
    v    = QTABLE[idx*OUT_W +: OUT_W];
    return quad[1] ? -v : v;
  endfunction

  logic [ADDR_W-1:0] addr_s, addr_c;
  assign addr_s = phase[PHASE_IN_W-1 -: ADDR_W];
  assign addr_c = addr_s + ADDR_W'(1 << (ADDR_W - 2));   // + quarter turn

  always_ff @(posedge clk) begin
    sin_o <= lookup(addr_s);
    cos_o <= lookup(addr_c);
  end

endmodule
