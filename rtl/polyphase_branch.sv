// polyphase_branch: one polyphase component E_k(z) of the interpolation
// low-pass, in direct transversal form.
//
// Branch k of an L-branch decomposition holds every L-th coefficient of the
// prototype filter starting at k: E_k(z) = sum_n h[L*n + k] z^-n. The branch
// sees the low-rate input delay line (taps[0] newest) and forms
// acc = sum_n h[L*n + PHASE] * taps[n] with full precision (coefficients in
// Q2.14, so acc carries 14 fractional bits). The decomposition follows the
// polyphase identity H(z) = sum_k z^-k E_k(z^L); the coefficient values are
// this design's own low-pass (see src_pkg).
//
// Interface: purely combinational, taps in, acc out, no clock.
module polyphase_branch
  import src_pkg::*;
#(
  parameter int unsigned L     = PP_L,     // number of branches
  parameter int unsigned TPP   = PP_TPP,   // taps per branch
  parameter int unsigned PHASE = 0,        // k, 0 .. L-1
  parameter coef_t       H [L*TPP] = PP_COEF  // prototype low-pass
) (
  input  sample_t taps [TPP],
  output acc_t    acc
);

  always_comb begin
    acc = '0;
    for (int n = 0; n < TPP; n++)
      acc += acc_t'(taps[n]) * acc_t'(H[L*n + PHASE]);
  end

endmodule
