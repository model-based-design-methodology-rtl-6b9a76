// farrow_horner: evaluates the Farrow output polynomial in mu,
//   y = sum_n v[n] * mu^n,  n = 0 .. P,
// by Horner's rule, y = ((v[P]*mu + v[P-1])*mu + ...)*mu + v[0], which needs
// only P multipliers by mu and P adders. mu is an unsigned fraction in
// [0, 1) with MU_W bits; each product is truncated back to the accumulator
// scale (floor), and the final sum, which carries the 14 fractional bits of
// the coefficients, is rounded and saturated to a 12-bit sample.
// The use of Horner's rule and the rounding are this design's choice for the
// "multiply by powers of mu and add" stage of the Farrow structure.
//
// Interface: purely combinational.
module farrow_horner
  import src_pkg::*;
#(
  parameter int unsigned ORDER = FAR_ORDER   // polynomial order P
) (
  input  acc_t    v [ORDER+1],
  input  mu_t     mu,
  output sample_t y,
  output logic    clipped     // y was saturated
);

  logic signed [47:0] t;
  logic signed [MU_W:0] mu_s;

  assign mu_s = {1'b0, mu};

  always_comb begin
    t = 48'(v[ORDER]);
    for (int n = ORDER - 1; n >= 0; n--)
      t = ((t * 48'(mu_s)) >>> MU_W) + 48'(v[n]);
  end

  assign y       = requant(t);
  assign clipped = requant_clips(t);

endmodule
