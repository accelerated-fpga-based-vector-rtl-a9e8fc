// vdf_argmin -- the comparator: which pixel the Vector Directional Filter outputs.
//
// Given the nine angular distances alpha_1..alpha_9, returns the index of
// the smallest (Eq. 1, y = x_(1)); the caller reads that pixel from the
// window.  When several are equally small the first in
// window order x1..x9 wins, as a sequential loop with a strict "<" would
// choose.  Purely combinational: a linear scan of nine compares; the caller
// uses the result in the same clock.  Selecting the minimum follows the filter definition; the
// tie rule and the scan structure are this design's own.
module vdf_argmin
  import vdf_pkg::*;
(
  input  alpha_t alpha [WIN],
  output idx_t   min_idx
);
  always_comb begin
    alpha_t best;
    best    = alpha[0];
    min_idx = '0;
    for (int k = 1; k < WIN; k++) begin
      if (alpha[k] < best) begin
        best    = alpha[k];
        min_idx = idx_t'(k);
      end
    end
  end
endmodule
