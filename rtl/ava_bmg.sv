// Branch metric generator (BMG).
//
// Computes, for one received pair of soft symbols, the distance to each of
// the four possible expected symbol pairs.  The ACS later picks one of these
// with the expected symbol of a trellis branch ("BM select").  The distance
// of one soft symbol r to an expected bit e is r when e = 0 and QMAX - r when
// e = 1; the branch metric is the sum over the two symbols.  bm[{e0,e1}]
// holds the metric for expected pair {e0,e1}.
//
// Purely combinational.  Computing all branch metrics up front and selecting
// them by expected symbol follows the decoder's description; the soft
// distance measure is this design's choice.
module ava_bmg
  import ava_pkg::*;
(
  input  sym_t r0,          // soft symbol for coded bit c0
  input  sym_t r1,          // soft symbol for coded bit c1
  output bm_t  bm [4]       // metric per expected pair {c0,c1}
);
  always_comb begin
    for (int e = 0; e < 4; e++) begin
      bm_t d0, d1;
      d0 = e[1] ? bm_t'(QMAX - int'(r0)) : bm_t'(r0);
      d1 = e[0] ? bm_t'(QMAX - int'(r1)) : bm_t'(r1);
      bm[e] = d0 + d1;
    end
  end
endmodule
