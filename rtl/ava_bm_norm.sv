// Best branch metric search and branch metric normalization.
//
// Finds the smallest of the four branch metrics of a stage and subtracts it
// from all four, so the best branch of every stage costs 0.  Because the same
// amount is taken off every candidate path of the stage, the comparisons of
// the ACS and of the threshold check are unchanged while the path metrics grow
// more slowly.  The two blocks and their place between branch metric
// computation and ACS are the decoder's; the exact operation (subtract the
// minimum) is this design's reading of their names.
//
// Purely combinational.
module ava_bm_norm
  import ava_pkg::*;
(
  input  bm_t bm     [4],
  output bm_t bm_n   [4]    // normalized metrics, min is 0
);
  bm_t bm_min;               // best branch metric

  always_comb begin
    bm_min = bm[0];
    for (int e = 1; e < 4; e++)
      if (bm[e] < bm_min) bm_min = bm[e];
    for (int e = 0; e < 4; e++)
      bm_n[e] = bm[e] - bm_min;
  end
endmodule
