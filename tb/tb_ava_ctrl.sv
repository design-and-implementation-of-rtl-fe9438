// Test of the control path.  The survivor count is modelled as the number of
// eight random candidate offsets below the working threshold, so it falls as
// T falls; many offsets are 0 so that ties survive even the smallest T, and
// one is below 8 so that the first evaluation keeps a path, as in the decoder.  For
// each stage the testbench predicts the threshold sequence (start at
// max(cfg_t, 8); commit with 1..N survivors; otherwise down by 2 while more
// than N pass and T > 2; up by 2 once if none pass, then commit; commit with
// trim if more than N pass at T <= 2) and checks t_cur, t_reduce, t_back,
// commit, trim, in_ready, the latched symbols and the stage's cycle count.
// N is the run-time survivor limit: cfg_nmax is drawn from 0..7 per stage
// (0 or above NMAX means NMAX), and the keep output is checked as well.
// Stages are offered back to back and with gaps.
module tb_ava_ctrl;
  import ava_pkg::*;
  localparam int NMAX = 4;
  logic clk = 1'b0, rst_n, in_valid, in_ready;
  sym_t r0, r1, r0_q, r1_q;
  thr_t cfg_t, t_cur;
  logic [3:0] count;
  logic [$clog2(NMAX):0] cfg_nmax, keep;
  logic commit, t_reduce, t_back, trim;
  int off [8];
  int checks = 0, failures = 0, n_reduce = 0, n_trim = 0, n_back = 0;
  always #5 clk = ~clk;

  ava_ctrl #(.NMAX(NMAX)) dut (.*);

  always_comb begin
    int n;
    n = 0;
    for (int c = 0; c < 8; c++) if (off[c] < int'(t_cur)) n++;
    count = 4'(n);
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; r0 = '0; r1 = '0; cfg_t = '0; cfg_nmax = '0;
    foreach (off[c]) off[c] = 0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    chk(in_ready && !commit, "idle after reset");
    for (int s = 0; s < 600; s++) begin
      int t, cfg, a, b, cycles, nm, lim;
      bit backed;
      cfg = $urandom_range(0, 40);
      nm = $urandom_range(0, 7);
      lim = (nm == 0 || nm > NMAX) ? NMAX : nm;
      a = $urandom_range(0, 7); b = $urandom_range(0, 7);
      // offer the pair (we are at a falling edge, decoder ready)
      cfg_t = thr_t'(cfg); r0 = sym_t'(a); r1 = sym_t'(b); in_valid = 1'b1;
      chk(in_ready, "ready to accept");
      @(posedge clk); #1;
      in_valid = 1'b0;
      // new limit only once the previous stage has committed
      cfg_nmax = 3'(nm);
      foreach (off[c]) off[c] = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(0, 30);
      // as in the decoder, the starting threshold (>= 8) keeps at least one path
      off[$urandom_range(0, 7)] = $urandom_range(0, 7);
      // every fourth stage: all offsets in a band two wide, so that one step
      // can take the count from above 4 to 0
      if (s % 4 == 3) begin
        int base;
        base = $urandom_range(2, 6);
        foreach (off[c]) off[c] = base + $urandom_range(0, 1);
      end
      t = (cfg < 8) ? 8 : cfg;
      backed = 0;
      cycles = 0;
      forever begin
        int n;
        @(negedge clk);
        cycles++;
        n = 0;
        foreach (off[c]) if (off[c] < t) n++;
        chk(int'(t_cur) == t, $sformatf("t_cur %0d expected %0d", t_cur, t));
        chk(int'(keep) == lim, "keep follows cfg_nmax");
        chk(r0_q == sym_t'(a) && r1_q == sym_t'(b), "latched symbols");
        if (backed || (n >= 1 && n <= lim) || (n > lim && t <= 2)) begin
          chk(commit && !t_reduce && !t_back && in_ready, "commit expected");
          chk(trim == (n > lim), "trim flag");
          n_trim += int'(trim);
          break;
        end
        if (n == 0) begin
          chk(!commit && t_back && !t_reduce && !in_ready, "step back expected");
          t += 2; backed = 1; n_back++;
        end else begin
          chk(!commit && t_reduce && !t_back && !in_ready, "reduction expected");
          t -= 2; n_reduce++;
        end
      end
      chk(cycles <= 25, "stage length bounded");
      // half of the stages leave a gap, the others go back to back
      if ($urandom_range(0, 1) == 0) begin
        @(posedge clk); #1;
        @(negedge clk);
        chk(in_ready && !commit, "idle between stages");
      end
    end
    chk(n_reduce > 0 && n_trim > 0 && n_back > 0, "reduction, step back and trim exercised");
    $display("reductions=%0d backs=%0d trims=%0d", n_reduce, n_back, n_trim);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
