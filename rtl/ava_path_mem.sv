// Survivor path memory and output decoder (register exchange).
//
// Each of the NMAX slots keeps the last L decoded bits of its path, newest in
// bit 0.  When a stage commits, slot j takes the path of the parent of its
// new candidate (slot src[j]/2) shifted by one with the candidate's input bit
// (src[j] mod 2) put in front; this is the "path in" step.  At the same
// commit the output decoder emits the oldest bit, bit L-1, of the best path
// of the stage being replaced (slot best, from the d_m search).  Output
// starts once L stages have been stored, so the decoded bit of stage n
// appears at the commit of stage n + L, registered (out_valid for one cycle).
//
// Storing survivor paths and decoding along the best one follow the
// decoder's description.  Register exchange instead of a trace-back memory,
// the depth L and best-path output are this design's choices.
module ava_path_mem
  import ava_pkg::*;
#(
  parameter int NMAX = 4,
  parameter int L    = 20,
  localparam int NC  = 2 * NMAX,
  localparam int CW  = $clog2(NC)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic commit,
  input  logic [CW-1:0] src [NMAX],
  input  logic [$clog2(NMAX)-1:0] best,
  output logic out_valid,
  output logic out_bit
);
  logic [L-1:0] path [NMAX];
  logic [$clog2(L+1)-1:0] fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NMAX; j++) path[j] <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (commit) begin
        for (int j = 0; j < NMAX; j++)
          path[j] <= {path[src[j][CW-1:1]][L-2:0], src[j][0]};
        out_bit   <= path[best][L-1];
        out_valid <= (int'(fill) == L);
        if (int'(fill) < L) fill <= fill + 1'b1;
      end
    end
  end
endmodule
