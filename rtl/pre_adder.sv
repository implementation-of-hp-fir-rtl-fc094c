// pre_adder: folds a symmetric or antisymmetric delay line in half.
//
// For a filter whose coefficients satisfy h(TAPS-1-i) = h(i) the products of
// tap i and tap TAPS-1-i share a coefficient, so the two samples can be added
// first and only TAPS/2 words need to be multiplied (here: fed to distributed
// arithmetic). For an antisymmetric filter, h(TAPS-1-i) = -h(i), the samples
// are subtracted instead:
//   folded[i] = taps[i] - taps[TAPS-1-i]   (ANTI = 1)
//   folded[i] = taps[i] + taps[TAPS-1-i]   (ANTI = 0)
// The result is one bit wider than the samples, so it never overflows. The
// block is purely combinational; the transposition registers that follow
// capture its outputs. Halving the number of words follows the filter's
// description; the subtracting variant for antisymmetric coefficients and the
// W+1 result width are this design's choices. TAPS must be even.
module pre_adder #(
  parameter int TAPS = 18,
  parameter int W    = 16,
  parameter bit ANTI = 1'b1
) (
  input  logic signed [W-1:0] taps   [TAPS],
  output logic signed [W:0]   folded [TAPS/2]
);

  if (TAPS % 2 != 0) begin : g_bad_taps
    $error("pre_adder: TAPS must be even");
  end

  always_comb begin
    for (int i = 0; i < TAPS/2; i++) begin
      if (ANTI) folded[i] = (W+1)'(taps[i]) - (W+1)'(taps[TAPS-1-i]);
      else      folded[i] = (W+1)'(taps[i]) + (W+1)'(taps[TAPS-1-i]);
    end
  end

endmodule
