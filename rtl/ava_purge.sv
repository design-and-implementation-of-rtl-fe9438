// Non-survivor purge.
//
// Removes the candidates that failed the threshold check and packs the
// survivors, in ascending candidate order, into the NMAX slots of the next
// path metric array; unused slots become invalid (their metric is 0).  Each
// kept metric is rescaled by subtracting d_m, so the stored metrics of a
// stage lie in [0, T) and never overflow.  src[j] names the candidate that
// fills slot j, which the survivor memory uses to copy the parent's path.
//
// At most keep (the run-time survivor limit N_max, 1..NMAX) candidates are
// kept; if more pass (only when the threshold loop could not bring the count
// down to N_max), the first ones in candidate order are kept.  Purely
// combinational, a prefix count over the pass flags.
//
// Purging failed paths follows the decoder's description; slot packing,
// rescaling by d_m and the overflow rule are this design's choices.
module ava_purge
  import ava_pkg::*;
#(
  parameter int NMAX = 4,
  localparam int NC  = 2 * NMAX,
  localparam int CW  = $clog2(NC)
) (
  input  cand_t   cand [NC],
  input  logic [NC-1:0] pass,
  input  metric_t d_m,
  input  logic [$clog2(NMAX):0] keep,
  output path_t   pm_next [NMAX],
  output logic [CW-1:0] src [NMAX]
);
  always_comb begin
    int k;
    k = 0;
    for (int j = 0; j < NMAX; j++) begin
      pm_next[j] = '0;
      src[j]     = '0;
    end
    for (int c = 0; c < NC; c++) begin
      if (pass[c] && k < int'(keep)) begin
        pm_next[k].valid  = 1'b1;
        pm_next[k].state  = cand[c].state;
        pm_next[k].metric = cand[c].metric - d_m;
        src[k]            = CW'(c);
        k = k + 1;
      end
    end
  end
endmodule
