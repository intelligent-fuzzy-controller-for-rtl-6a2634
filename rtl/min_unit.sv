// min_unit: element-wise minimum of two fuzzy sets.
//
// This is the "minimum unit" of the fuzzy model/inference datapath. It holds
// W_MAX comparators side by side, one per point of the universe, so a whole
// 75-bit fuzzy word is processed in one pass. In the inference unit operand a
// is a single degree of X broadcast to every point (u_i paired with all w
// elements), and operand b is Y_I (learning) or a row of R (inference). The
// pre-processing unit uses the same unit to intersect the fuzzy inputs.
// Purely combinational, no clock.
module min_unit
  import fuzzy_pkg::*;
(
  input  fvec_t a,
  input  fvec_t b,
  output fvec_t y
);

  always_comb begin
    for (int j = 0; j < int'(W_MAX); j++)
      y[j] = (a[j] < b[j]) ? a[j] : b[j];
  end

endmodule
