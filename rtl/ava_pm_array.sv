// Path metric array (PMU).
//
// NMAX registers, each holding one surviving path: valid flag, trellis state
// and rescaled metric.  The array is read by the ACS and the d_m search and
// loaded with the purged, packed survivors when the control path commits a
// stage.  Reset leaves one valid path in state 0 with metric 0, matching an
// encoder that starts from the all-zero state.
//
// Timing: pm changes on the rising clock edge after load is high.
// Holding the metrics of one stage for the next follows the decoder's
// description; the reset contents are this design's choice.
module ava_pm_array
  import ava_pkg::*;
#(
  parameter int NMAX = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  path_t pm_next [NMAX],
  output path_t pm      [NMAX]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NMAX; j++) pm[j] <= '0;
      pm[0].valid <= 1'b1;
    end else if (load) begin
      pm <= pm_next;
    end
  end
endmodule
