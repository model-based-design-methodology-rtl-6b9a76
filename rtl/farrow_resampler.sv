// farrow_resampler: arbitrary-ratio resampler built on the Farrow structure
// (stage 2 of the converter, 32 kHz -> 44.1 kHz).
//
// A phase accumulator tracks the position of the next output sample on the
// input time axis: a fraction mu in [0, 1) between the two middle taps of
// the sub-filters, plus a count of input samples still to be taken before
// that output can be formed. After each output the accumulator advances by
// `step` = f_in / f_out input periods (unsigned, INT_W.FRAC_W fixed point);
// the integer part of the sum is the number of inputs to take next. With
// step < 1 (interpolation, e.g. 32000/44100) one input yields one or two
// outputs; step > 1 would consume several inputs per output. Because the
// ratio is a run-time number, any ratio including irrational ones can be
// approximated to 2^-FRAC_W.
//
// Datapath: farrow_subfilters (constant sub-filters, transposed form) feed
// farrow_horner (polynomial in mu, top MU_W bits of the fraction).
//
// Interface: valid/ready streams. in_ready is high while inputs are owed,
// out_valid while an output is due; the two are never high together. After
// reset one input is owed and mu = 0. The output is combinational from
// registers and stays stable until taken; step is sampled when an output is
// taken. The sub-filter/polynomial structure follows the Farrow structure;
// the phase accumulator and handshake are this design's own.
module farrow_resampler
  import src_pkg::*;
#(
  parameter int unsigned ORDER = FAR_ORDER,   // polynomial order P
  parameter int unsigned TAPS  = FAR_TAPS,    // sub-filter length N
  parameter coef_t       B [ORDER+1][TAPS] = FAR_COEF
) (
  input  logic    clk,
  input  logic    rst_n,
  input  step_t   step,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output sample_t out_data,
  output logic    out_clipped   // current output was saturated
);

  logic [FRAC_W-1:0]        frac;     // mu at full precision
  logic [INT_W:0]           owed;     // inputs still to take before the next output
  logic [INT_W+FRAC_W:0]    next_pos;
  acc_t                     v [ORDER+1];
  logic                     in_fire, out_fire;

  assign in_ready  = (owed != '0);
  assign out_valid = (owed == '0);
  assign in_fire   = in_valid && in_ready;
  assign out_fire  = out_valid && out_ready;
  assign next_pos  = {{(INT_W+1){1'b0}}, frac} + {1'b0, step};

  farrow_subfilters #(.ORDER(ORDER), .TAPS(TAPS), .B(B)) u_sub (
    .clk, .rst_n, .load(in_fire), .in_data, .v
  );

  farrow_horner #(.ORDER(ORDER)) u_poly (
    .v, .mu(frac[FRAC_W-1 -: MU_W]), .y(out_data), .clipped(out_clipped)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frac <= '0;
      owed <= (INT_W+1)'(1);
    end else if (in_fire) begin
      owed <= owed - 1'b1;
    end else if (out_fire) begin
      frac <= next_pos[FRAC_W-1:0];
      owed <= next_pos[INT_W+FRAC_W:FRAC_W];
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_data));
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
      !(in_ready && out_valid));

endmodule
