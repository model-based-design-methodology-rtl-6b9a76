// farrow_subfilters: the P+1 constant sub-filters b_0 .. b_P of the Farrow
// structure, in transposed form.
//
// Each new input sample x is multiplied by all the constant coefficients
// b_n(i) at once; the products are added into a chain of partial-sum
// registers, one chain per sub-filter, so that after the update
//   v[n] = sum_i b_n(i) * x[m-i]     (i = 0 .. N-1, x[m] the newest)
// without keeping a delay line of raw samples. The v[n] are the Farrow
// branch outputs that the mu polynomial (farrow_horner) combines. The
// transposed arrangement follows the transposed Farrow structure; the
// coefficient set (cubic Lagrange, see src_pkg) is this design's choice.
//
// Interface: load is a one-cycle strobe carrying in_data; v[] is registered
// and shows the result from the cycle after the strobe. Reset clears all
// partial sums, i.e. the filter starts from an all-zero history.
module farrow_subfilters
  import src_pkg::*;
#(
  parameter int unsigned ORDER = FAR_ORDER,  // polynomial order P
  parameter int unsigned TAPS  = FAR_TAPS,   // sub-filter length N (>= 2)
  parameter coef_t       B [ORDER+1][TAPS] = FAR_COEF  // b_n(i), Q2.14
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  sample_t in_data,
  output acc_t    v [ORDER+1]
);

  acc_t prod [ORDER+1][TAPS];     // x * b_n(i)
  acc_t part [ORDER+1][TAPS];     // part[n][i], i >= 1, partial sums

  always_comb begin
    for (int n = 0; n <= ORDER; n++)
      for (int i = 0; i < TAPS; i++)
        prod[n][i] = acc_t'(in_data) * acc_t'(B[n][i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n <= ORDER; n++) begin
        v[n] <= '0;
        for (int i = 0; i < TAPS; i++) part[n][i] <= '0;
      end
    end else if (load) begin
      for (int n = 0; n <= ORDER; n++) begin
        v[n] <= prod[n][0] + part[n][1];
        for (int i = 1; i < TAPS - 1; i++) part[n][i] <= prod[n][i] + part[n][i+1];
        part[n][TAPS-1] <= prod[n][TAPS-1];
        part[n][0] <= '0;  // unused position, kept at zero
      end
    end
  end

endmodule
