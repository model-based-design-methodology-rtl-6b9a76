// src_pkg: shared types, sizes and filter coefficients of the hybrid
// 8 kHz -> 44.1 kHz sampling rate converter.
//
// The converter is two cascaded stages. A polyphase FIR interpolator raises
// the rate by L = 4 (8 kHz -> 32 kHz); a cubic Farrow resampler then moves the
// 32 kHz stream onto the 44.1 kHz grid with a fractional delay mu that a phase
// accumulator advances by 32000/44100 input periods per output. Every stage
// receives and delivers 12-bit two's-complement samples.
//
// Coefficient tables (all Q2.14, i.e. 16384 = 1.0):
//   * Polyphase low-pass, 20 taps, cut-off at 4 kHz of the 32 kHz rate:
//       p(n) = w(n) * sinc((n - 9.5)/4),  w(n) = 0.54 - 0.46*cos(2*pi*n/19)
//       (Hamming-windowed sinc), then each branch k (taps n = k, k+4, ...) is
//       scaled to a DC gain of exactly 1:
//       h[n] = round(2^14 * p(n) / sum_{j = k mod 4} p(j)),
//     with h[8] and h[11] raised by one LSB so every branch sums to 16384.
//     Equal branch gains keep the image of DC out of the 32 kHz stream.
//   * Farrow sub-filters b_n(i), n = 0..3 (powers of mu), i = 0..3 (tap age,
//     0 = newest): the cubic Lagrange interpolator between the two middle
//     taps, b_n(i) = round(2^14 * c) with c taken from
//       b_0 = [   0,    0,    1,    0 ]
//       b_1 = [-1/6,    1, -1/2, -1/3 ]
//       b_2 = [   0,  1/2,   -1,  1/2 ]
//       b_3 = [ 1/6, -1/2,  1/2, -1/6 ]
//     20 + 16 = 36 stored coefficients in all.
package src_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DATA_W    = 12;  // sample width at every stage boundary
  localparam int unsigned COEF_W    = 16;  // coefficient width
  localparam int unsigned COEF_FRAC = 14;  // fractional bits of the coefficients
  localparam int unsigned ACC_W     = 32;  // sub-filter / branch accumulator width

  localparam int unsigned PP_L      = 4;   // interpolation factor of stage 1
  localparam int unsigned PP_TAPS   = 20;  // prototype low-pass length
  localparam int unsigned PP_TPP    = PP_TAPS / PP_L;  // taps per branch

  localparam int unsigned FAR_ORDER = 3;   // polynomial order P
  localparam int unsigned FAR_TAPS  = 4;   // sub-filter length N

  localparam int unsigned FRAC_W    = 32;  // fractional bits of the phase accumulator
  localparam int unsigned INT_W     = 4;   // integer bits of the phase step
  localparam int unsigned MU_W      = 16;  // bits of mu used by the multipliers

  // Phase step for 32 kHz -> 44.1 kHz: ceil(2^32 * 32000 / 44100). Rounding
  // up makes a 320-sample block yield exactly 441 outputs; the residual
  // ratio error is below 2^-32 relative.
  localparam logic [INT_W+FRAC_W-1:0] STEP_32K_TO_44K1 = 36'd3116529558;

  // ---------------------------------------------------------------- types
  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic [MU_W-1:0]          mu_t;
  typedef logic [INT_W+FRAC_W-1:0]  step_t;

  // ---------------------------------------------------------------- tables
  localparam coef_t PP_COEF [PP_TAPS] = '{
      16'sd161,   16'sd98,    -16'sd188,  -16'sd849,  -16'sd1485,
     -16'sd1024,  16'sd1651,   16'sd6514,  16'sd12043, 16'sd15847,
      16'sd15847, 16'sd12043,  16'sd6514,  16'sd1651, -16'sd1024,
     -16'sd1485, -16'sd849,   -16'sd188,   16'sd98,    16'sd161 };

  localparam coef_t FAR_COEF [FAR_ORDER+1][FAR_TAPS] = '{
      '{  16'sd0,     16'sd0,     16'sd16384,  16'sd0    },
      '{ -16'sd2731,  16'sd16384, -16'sd8192, -16'sd5461 },
      '{  16'sd0,     16'sd8192, -16'sd16384,  16'sd8192 },
      '{  16'sd2731, -16'sd8192,   16'sd8192, -16'sd2731 } };

  // ---------------------------------------------------------------- helpers
  // Requantise an accumulator with COEF_FRAC fractional bits to a DATA_W
  // sample: round half up, then saturate to the 12-bit range.
  function automatic sample_t requant(input logic signed [47:0] acc);
    logic signed [47:0] r;
    r = (acc + 48'sd8192) >>> COEF_FRAC;
    if (r > 48'sd2047)       return sample_t'(12'sd2047);
    else if (r < -48'sd2048) return sample_t'(-12'sd2048);
    else                     return sample_t'(r[DATA_W-1:0]);
  endfunction

  // True when requant() clips its argument.
  function automatic logic requant_clips(input logic signed [47:0] acc);
    logic signed [47:0] r;
    r = (acc + 48'sd8192) >>> COEF_FRAC;
    return (r > 48'sd2047) || (r < -48'sd2048);
  endfunction

endpackage
