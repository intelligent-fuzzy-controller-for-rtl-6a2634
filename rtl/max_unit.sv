// max_unit: element-wise maximum over N_IN fuzzy sets.
//
// The "maximum unit" of the fuzzy model/inference datapath, implementing the
// union (sentence connective ALSO) and the max part of the max-min
// composition. With N_IN = 2 it is the single unit of the basic datapath;
// with more inputs it is the reduction tree that merges the parallel paths.
// Purely combinational, no clock.
module max_unit
  import fuzzy_pkg::*;
#(
  parameter int unsigned N_IN = 2
) (
  input  fvec_t in [N_IN],
  output fvec_t y
);

  always_comb begin
    y = in[0];
    for (int n = 1; n < int'(N_IN); n++)
      for (int j = 0; j < int'(W_MAX); j++)
        if (in[n][j] > y[j]) y[j] = in[n][j];
  end

endmodule
