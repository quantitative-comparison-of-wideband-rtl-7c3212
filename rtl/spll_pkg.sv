// spll_pkg: shared widths, number formats and coefficient helpers of the
// subtraction-based phase-locked loop (S-PLL).
//
// Number formats used throughout the design:
//  * Samples (ADC in, DAC out) are signed two's complement, SAMPLE_W bits,
//    full scale = +/-(2^(SAMPLE_W-1)-1).
//  * A phase-accumulator value or frequency tuning word (FTW) is ACC_W bits;
//    one full turn (2*pi) is 2^ACC_W, so f = FTW * F_CLK / 2^ACC_W.
//  * A phase word is PHASE_W bits, one turn = 2^PHASE_W, read as signed
//    (-pi .. +pi) where a difference is meant.
//  * Filter coefficients are signed with COEF_FRAC fractional bits.
// The 100 MHz clock is the published design's; every width is this design's choice,
// it gives none.
package spll_pkg;

  localparam real F_CLK_HZ  = 100.0e6;  // FPGA clock and converter rate
  localparam real PI        = 3.14159265358979323846;

  localparam int SAMPLE_W   = 16;       // ADC / DAC word
  localparam int ACC_W      = 32;       // phi-VCO accumulator and FTW
  localparam int PHASE_W    = 16;       // phase word for CORDIC, PC and LF
  localparam int FILT_W     = 24;       // mixer output and HPF data path
  localparam int COEF_W     = 27;       // HPF coefficient word
  localparam int COEF_FRAC  = 24;       // HPF coefficient fraction bits
  localparam int GAIN_W     = 24;       // LF gain word
  localparam int GAIN_FRAC  = 8;        // LF gain fraction bits

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [ACC_W-1:0]    acc_t;
  typedef logic signed [ACC_W-1:0]    ftw_t;
  typedef logic        [PHASE_W-1:0]  phase_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [GAIN_W-1:0]   gain_t;

  // Coefficients of a second-order Butterworth high-pass section,
  // H(z) = b0 (1 - 2 z^-1 + z^-2) / (1 + a1 z^-1 + a2 z^-2),
  // obtained with the bilinear transform (prewarped cut-off fc).
  typedef struct packed {
    coef_t b0;
    coef_t a1;
    coef_t a2;
  } hpf_coef_t;

  function automatic coef_t to_coef(input real v);
    return coef_t'($rtoi(v * real'(64'd1 << COEF_FRAC) + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic hpf_coef_t butter_hpf(input real fc_hz);
    real k, norm;
    hpf_coef_t c;
    k    = $tan(PI * fc_hz / F_CLK_HZ);
    norm = 1.0 + $sqrt(2.0) * k + k * k;
    c.b0 = to_coef(1.0 / norm);
    c.a1 = to_coef(2.0 * (k * k - 1.0) / norm);
    c.a2 = to_coef((1.0 - $sqrt(2.0) * k + k * k) / norm);
    return c;
  endfunction

  // Frequency in Hz to tuning word.
  function automatic acc_t hz_to_ftw(input real f_hz);
    return acc_t'(longint'($rtoi(f_hz / F_CLK_HZ * 4294967296.0 + 0.5)));
  endfunction

endpackage
