// d_m search: minimum path metric among the surviving paths of a stage.
//
// Scans the NMAX entries of the path metric array and returns the smallest
// metric of a valid entry (d_m) and the slot that holds it (the lowest slot
// on a tie).  d_m is the reference of the threshold check for the next stage
// and the slot is the best path the output decoder reads.  If no entry is
// valid, d_m is 0 and best is 0; the decoder never leaves that case once
// reset.  Purely combinational, a linear compare chain.
//
// Computing d_m over the previous stage follows the decoder's description;
// the tie rule is this design's choice.
module ava_min_metric
  import ava_pkg::*;
#(
  parameter int NMAX = 4
) (
  input  path_t   pm   [NMAX],
  output metric_t d_m,
  output logic [$clog2(NMAX)-1:0] best
);
  always_comb begin
    logic found;
    found = 1'b0;
    d_m   = '0;
    best  = '0;
    for (int j = 0; j < NMAX; j++) begin
      if (pm[j].valid && (!found || pm[j].metric < d_m)) begin
        found = 1'b1;
        d_m   = pm[j].metric;
        best  = ($clog2(NMAX))'(j);
      end
    end
  end
endmodule
