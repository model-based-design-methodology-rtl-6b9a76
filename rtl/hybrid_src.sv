// hybrid_src: hybrid sampling rate converter, 8 kHz -> 44.1 kHz.
//
// The conversion factor 441/80 is split in two. A polyphase FIR interpolator
// first raises the rate by 4 (8 kHz -> 32 kHz): an integer factor is where a
// polyphase filter is cheapest. A Farrow resampler then covers the remaining
// fractional factor 441/320 (32 kHz -> 44.1 kHz) with a cubic polynomial in
// the fractional delay mu, so no per-phase coefficient table is needed for
// the 441 possible output phases. The low-pass before the Farrow stage also
// keeps its input band well below 16 kHz, which is what makes a low-order
// polynomial sufficient. 36 coefficients are stored in all; every stage
// boundary carries 12-bit samples.
//
// Interface: a valid/ready input stream (12-bit samples at the low rate) and
// a valid/ready output stream (12-bit samples at the high rate). Rates are set
// by the producer and consumer; the core runs on one clock far faster than
// either and simply back-pressures. phase_step sets the Farrow ratio
// f_mid / f_out as an unsigned 4.32 fixed-point number; src_pkg::
// STEP_32K_TO_44K1 gives 8 kHz -> 44.1 kHz, other values give other output
// rates (44.1 kHz * 32000/44100 / step). Asynchronous active-low reset.
// out_clipped flags an output the final rounding saturated.
// The two-stage split and 12-bit stage boundaries follow the hybrid scheme;
// the coefficient values, widths, handshake and reset are this design's own.
module hybrid_src
  import src_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  step_t   phase_step,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output sample_t out_data,
  output logic    out_clipped
);

  logic    mid_valid, mid_ready;
  sample_t mid_data;

  polyphase_interpolator u_interp (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid(mid_valid), .out_ready(mid_ready), .out_data(mid_data)
  );

  farrow_resampler u_farrow (
    .clk, .rst_n, .step(phase_step),
    .in_valid(mid_valid), .in_ready(mid_ready), .in_data(mid_data),
    .out_valid, .out_ready, .out_data, .out_clipped
  );

endmodule
