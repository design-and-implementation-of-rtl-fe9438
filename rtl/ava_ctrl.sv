// Control path: symbol intake and threshold iteration.
//
// A stage starts when a symbol pair is accepted (in_valid && in_ready): the
// pair is registered and the working threshold t_cur is loaded with the
// configured threshold cfg_t (raised to T_MIN if smaller, so that the first
// evaluation always keeps at least one path).  While the stage is open the
// datapath evaluates it combinationally with t_cur, and each cycle the
// control path acts on the survivor count against the survivor limit N_max
// (keep = cfg_nmax, taken as NMAX when 0 or above NMAX):
//   1..N_max survivors     commit the stage;
//   more than N_max        lower t_cur by T_STEP and evaluate again, or, if
//                          t_cur is already at most T_STEP, commit and keep
//                          the first N_max (trim);
//   no survivor            the last step went too far: raise t_cur by T_STEP
//                          again (t_back) and commit at that threshold in the
//                          next cycle, keeping the first N_max (trim).
// cfg_nmax is a setting chosen before decoding starts; hold it stable.
// Each stage therefore takes 1 + (number of threshold steps) cycles, and
// in_ready is high in the commit cycle so a new pair can follow at once.
//
// Lowering T by 2 until at most N_max paths survive, and restoring T for
// each new stage, follow the decoder's description.  The valid/ready
// handshake, one step per cycle, the lower bound T_MIN on the starting
// threshold and the step-back and trim rules for the case where no single
// threshold gives between 1 and N_max survivors are this design's choices.
module ava_ctrl
  import ava_pkg::*;
#(
  parameter int NMAX = 4,
  localparam int NC  = 2 * NMAX
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  sym_t r0,
  input  sym_t r1,
  input  thr_t cfg_t,
  input  logic [$clog2(NMAX):0] cfg_nmax, // survivor limit N_max, 1..NMAX
  input  logic [$clog2(NC):0] count,   // survivors at t_cur
  output logic [$clog2(NMAX):0] keep,  // effective N_max for the purge
  output sym_t r0_q,
  output sym_t r1_q,
  output thr_t t_cur,
  output logic commit,                 // stage done, load results
  output logic t_reduce,               // threshold lowered this cycle
  output logic t_back,                 // threshold raised back this cycle
  output logic trim                    // committed with more than N_max passing
);
  logic busy;
  logic backed;                        // stepped back, commit next
  logic too_many, none;
  thr_t t_load;

  assign t_load   = (int'(cfg_t) < T_MIN) ? thr_t'(T_MIN) : cfg_t;
  assign keep     = (cfg_nmax == '0 || int'(cfg_nmax) > NMAX) ?
                    ($clog2(NMAX)+1)'(NMAX) : cfg_nmax;
  assign too_many = count > ($clog2(NC)+1)'(keep);
  assign none     = (count == '0);
  assign commit   = busy && (backed || (!too_many && !none) ||
                             (too_many && int'(t_cur) <= T_STEP));
  assign t_reduce = busy && !commit && too_many;
  assign t_back   = busy && !commit && none;
  assign trim     = commit && too_many;
  assign in_ready = !busy || commit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      backed <= 1'b0;
      r0_q   <= '0;
      r1_q   <= '0;
      t_cur  <= '0;
    end else if (in_valid && in_ready) begin
      busy   <= 1'b1;
      backed <= 1'b0;
      r0_q   <= r0;
      r1_q   <= r1;
      t_cur  <= t_load;
    end else if (commit) begin
      busy   <= 1'b0;
      backed <= 1'b0;
    end else if (t_reduce) begin
      t_cur  <= t_cur - thr_t'(T_STEP);
    end else if (t_back) begin
      t_cur  <= t_cur + thr_t'(T_STEP);
      backed <= 1'b1;
    end
  end

  // A stage never ends up with no survivor after stepping back, and the
  // threshold stays positive while a stage is open.
  a_back_keeps : assert property (@(posedge clk) disable iff (!rst_n)
                                  busy && backed |-> !none);
  a_t_pos      : assert property (@(posedge clk) disable iff (!rst_n)
                                  busy |-> t_cur != '0);
endmodule
