// Test of the non-survivor purge: random candidates and pass flags (from
// none to all passing) and a random survivor limit keep (1..NMAX).  Slots
// must hold the passing candidates in ascending order, at most keep of them,
// with metric - d_m and src naming the candidate; remaining slots must be
// invalid.
module tb_ava_purge;
  import ava_pkg::*;
  localparam int NMAX = 4;
  localparam int NC = 2 * NMAX;
  cand_t   cand [NC];
  logic [NC-1:0] pass;
  metric_t d_m;
  logic [$clog2(NMAX):0] keep;
  path_t   pm_next [NMAX];
  logic [$clog2(NC)-1:0] src [NMAX];
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ava_purge #(.NMAX(NMAX)) dut (.cand, .pass, .d_m, .keep, .pm_next, .src);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (3000) begin
      int dm, lim, list[$];
      dm = $urandom_range(0, 40);
      lim = $urandom_range(1, NMAX);
      d_m = metric_t'(dm);
      keep = ($clog2(NMAX)+1)'(lim);
      list = {};
      for (int c = 0; c < NC; c++) begin
        cand[c].alive  = 1'b1;
        cand[c].state  = state_t'($urandom_range(0, 7));
        cand[c].metric = metric_t'(dm + $urandom_range(0, 30));
        pass[c] = $urandom_range(0, 2) != 0;
        if (pass[c] && list.size() < lim) list.push_back(c);
      end
      #1;
      for (int j = 0; j < NMAX; j++) begin
        if (j < list.size()) begin
          int c;
          c = list[j];
          chk(pm_next[j].valid, $sformatf("slot %0d valid", j));
          chk(int'(src[j]) == c, $sformatf("slot %0d src %0d exp %0d", j, src[j], c));
          chk(pm_next[j].state == cand[c].state, $sformatf("slot %0d state", j));
          chk(int'(pm_next[j].metric) == int'(cand[c].metric) - dm, $sformatf("slot %0d metric", j));
        end else begin
          chk(!pm_next[j].valid, $sformatf("slot %0d must be empty", j));
        end
      end
    end
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
