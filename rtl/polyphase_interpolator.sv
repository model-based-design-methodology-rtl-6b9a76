// polyphase_interpolator: interpolate-by-L FIR in efficient polyphase form
// (stage 1 of the converter, 8 kHz -> 32 kHz).
//
// Instead of inserting L-1 zeros between input samples and filtering at the
// high rate, the low-pass is split into L branches E_0 .. E_{L-1} that all
// work on the same low-rate delay line; a commutator then reads the branch
// results out one after the other, E_0 first. Each input sample thus yields L
// output samples, output j = L*m + k being sum_n h[L*n+k] * x[m-n], which is
// exactly the zero-stuffed signal filtered by h. Branch results are rounded
// and saturated back to 12 bits, as every stage input is 12 bits wide.
//
// Interface: valid/ready streams on both sides, one transfer per clock at
// most; the sample rates are set by the producer and consumer. in_ready is
// high while no output is pending, and also during the last output phase
// when that output is taken, so a new sample can be accepted back to back.
// Timing: the first of the L outputs is offered the cycle after the input is
// accepted; outputs are held stable while out_ready is low.
// The branch/commutator structure follows the polyphase interpolator
// structure; the handshake, reset and rounding are this design's own.
module polyphase_interpolator
  import src_pkg::*;
#(
  parameter int unsigned L   = PP_L,      // interpolation factor
  parameter int unsigned TPP = PP_TPP,    // taps per branch
  parameter coef_t       H [L*TPP] = PP_COEF  // prototype low-pass, Q2.14
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output sample_t out_data
);

  localparam int unsigned PH_W = (L > 1) ? $clog2(L) : 1;

  sample_t         taps [TPP];   // low-rate delay line, taps[0] newest
  acc_t            branch_acc [L];
  logic            busy;            // outputs of the last input pending
  logic [PH_W-1:0] phase;           // commutator position
  logic            in_fire, out_fire, last_phase;

  for (genvar k = 0; k < L; k++) begin : g_branch
    polyphase_branch #(.L(L), .TPP(TPP), .PHASE(k), .H(H)) u_branch (.taps(taps), .acc(branch_acc[k]));
  end

  assign last_phase = (phase == PH_W'(L-1));
  assign in_ready   = !busy || (last_phase && out_ready);
  assign in_fire    = in_valid && in_ready;
  assign out_valid  = busy;
  assign out_fire   = out_valid && out_ready;
  assign out_data   = requant(48'(signed'(branch_acc[phase])));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      phase <= '0;
      for (int n = 0; n < TPP; n++) taps[n] <= '0;
    end else begin
      if (out_fire) begin
        phase <= last_phase ? '0 : phase + 1'b1;
        if (last_phase) busy <= 1'b0;
      end
      if (in_fire) begin
        taps[0] <= in_data;
        for (int n = 1; n < TPP; n++) taps[n] <= taps[n-1];
        busy  <= 1'b1;
        phase <= '0;
      end
    end
  end

  // Handshake rule: an offered output stays put until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
