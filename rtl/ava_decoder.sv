// Adaptive Viterbi decoder, top level.
//
// Decodes a rate-1/2, K=4 convolutional code from 3-bit soft symbols while
// keeping at most N_max (cfg_nmax, up to NMAX) of the 8 trellis states alive
// per stage.  Per stage: the BMG computes the four branch metrics, which are
// normalized to a best value of 0; the ACS extends the NMAX stored paths to
// 2*NMAX candidates and resolves merging candidates; the threshold check
// keeps the candidates whose metric is below d_m + T (d_m the best metric of
// the previous stage); the control path lowers T by 2 and re-evaluates, one
// cycle per step, until at most N_max candidates pass (if a step leaves none,
// T goes back up by 2 and the first N_max of those passing are kept); the
// purge packs the survivors into the path metric array (rescaled by d_m) and
// the survivor memory extends their paths and emits one decoded bit.
//
// Interface: in_valid/in_ready handshake on the symbol pair (r0 for coded bit
// c0, r1 for c1).  cfg_t is the threshold restored at every stage and
// cfg_nmax the survivor limit N_max (1..NMAX; 0 means NMAX); both are set
// before decoding and held stable; NMAX is the hardware size.  out_valid
// pulses with each decoded bit; the bit of stage n comes out at the commit of
// stage n + L, one cycle later.  The
// status outputs show the path valid flags of the stage being evaluated, its
// survivor count, the working threshold and the iteration events.
//
// Timing: a stage needs one cycle plus one per threshold step (down or back
// up); with no step the decoder accepts a pair every cycle.
//
// The path retention rules (threshold d_m + T, at most N_max survivors,
// T lowered by 2 per iteration) and the block split follow the decoder's
// description.  The code, widths, NMAX, L, handshake, step-back and tie rules
// are this design's choices, as explained in each block.
module ava_decoder
  import ava_pkg::*;
#(
  parameter int NMAX = 4,
  parameter int L    = 20,
  localparam int NC  = 2 * NMAX
) (
  input  logic clk,
  input  logic rst_n,
  input  thr_t cfg_t,
  input  logic [$clog2(NMAX):0] cfg_nmax,
  input  logic in_valid,
  output logic in_ready,
  input  sym_t r0,
  input  sym_t r1,
  output logic out_valid,
  output logic out_bit,
  output logic [NC-1:0]       path_valid,
  output logic [$clog2(NC):0] n_surv,
  output thr_t t_cur,
  output logic t_reduce,
  output logic t_back,
  output logic trim
);
  sym_t    r0_q, r1_q;
  bm_t     bm   [4];
  bm_t     bm_n [4];
  path_t   pm      [NMAX];
  path_t   pm_next [NMAX];
  metric_t d_m;
  logic [$clog2(NMAX)-1:0] best;
  cand_t   cand [NC];
  logic [$clog2(NC)-1:0] src [NMAX];
  logic    commit;
  logic [$clog2(NMAX):0] keep;

  ava_ctrl #(.NMAX(NMAX)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .r0, .r1, .cfg_t, .cfg_nmax,
    .count(n_surv), .keep, .r0_q, .r1_q, .t_cur, .commit, .t_reduce, .t_back, .trim
  );

  ava_bmg u_bmg (.r0(r0_q), .r1(r1_q), .bm);

  ava_bm_norm u_bm_norm (.bm, .bm_n);

  ava_pm_array #(.NMAX(NMAX)) u_pm (
    .clk, .rst_n, .load(commit), .pm_next, .pm
  );

  ava_min_metric #(.NMAX(NMAX)) u_dm (.pm, .d_m, .best);

  ava_acs #(.NMAX(NMAX)) u_acs (.pm, .bm_n, .cand);

  ava_threshold #(.NMAX(NMAX)) u_thr (
    .cand, .d_m, .t_cur, .pass(path_valid), .count(n_surv)
  );

  ava_purge #(.NMAX(NMAX)) u_purge (
    .cand, .pass(path_valid), .d_m, .keep, .pm_next, .src
  );

  ava_path_mem #(.NMAX(NMAX), .L(L)) u_smu (
    .clk, .rst_n, .commit, .src, .best, .out_valid, .out_bit
  );
endmodule
