// Threshold check.
//
// A candidate path survives when it is alive after the ACS and its metric d_i
// is below d_m + T, d_m being the smallest surviving metric of the previous
// stage.  The unit outputs the per-candidate path valid flags and the number
// of survivors, which the control path compares with N_max.  Purely
// combinational: NC comparators and a population count.
//
// The retention rule (strictly less than d_m + T) follows the decoder's
// description; the widths are this design's.
module ava_threshold
  import ava_pkg::*;
#(
  parameter int NMAX = 4,
  localparam int NC  = 2 * NMAX
) (
  input  cand_t   cand [NC],
  input  metric_t d_m,
  input  thr_t    t_cur,
  output logic [NC-1:0]        pass,
  output logic [$clog2(NC):0]  count
);
  logic [MW:0] limit;
  assign limit = {1'b0, d_m} + (MW+1)'(t_cur);

  always_comb begin
    count = '0;
    for (int c = 0; c < NC; c++) begin
      pass[c] = cand[c].alive && ({1'b0, cand[c].metric} < limit);
      count   = count + ($clog2(NC)+1)'(pass[c]);
    end
  end
endmodule
