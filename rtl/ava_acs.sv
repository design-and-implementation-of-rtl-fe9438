// Add-compare-select unit for the adaptive decoder.
//
// Each of the NMAX stored survivors is extended by both input bits, giving
// 2*NMAX candidate paths; candidate c = 2*j + b extends slot j with bit b.
// Add: the candidate metric d_i is the parent metric plus the branch metric
// selected by the expected symbol of that branch.  Compare-select: because
// only some states are alive, two candidates can reach the same state; all
// candidates are compared pairwise and the one with the higher metric (or,
// on a tie, the higher index) is marked dead.  A candidate whose parent slot
// is empty is dead too.  The alive flags are the raw path valid signals that
// the threshold check then narrows.
//
// Purely combinational.  The 2*NMAX candidate structure and the BM select
// follow the decoder's description; the pairwise merge and its tie rule are
// this design's choices.
module ava_acs
  import ava_pkg::*;
#(
  parameter int NMAX = 4,
  localparam int NC  = 2 * NMAX
) (
  input  path_t pm   [NMAX],
  input  bm_t   bm_n [4],
  output cand_t cand [NC]
);
  cand_t raw [NC];

  // Add: extend every slot by both bits.
  always_comb begin
    for (int c = 0; c < NC; c++) begin
      path_t p;
      logic  b;
      p = pm[c / 2];
      b = c[0];
      raw[c].alive  = p.valid;
      raw[c].state  = next_state(p.state, b);
      raw[c].metric = p.metric + metric_t'(bm_n[expected_sym(p.state, b)]);
    end
  end

  // Compare-select among candidates that merge into the same state.
  always_comb begin
    for (int c = 0; c < NC; c++) begin
      logic beaten;
      beaten = 1'b0;
      for (int o = 0; o < NC; o++) begin
        if (o != c && raw[o].alive && raw[o].state == raw[c].state &&
            (raw[o].metric < raw[c].metric ||
             (raw[o].metric == raw[c].metric && o < c)))
          beaten = 1'b1;
      end
      cand[c]       = raw[c];
      cand[c].alive = raw[c].alive && !beaten;
    end
  end
endmodule
