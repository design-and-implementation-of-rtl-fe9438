// Test of the ACS unit with random survivor sets (distinct states, random
// valid flags and metrics) and random normalized branch metrics.  Expected
// candidate states and metrics come from the reference encoder; the merge is
// checked by requiring exactly one alive candidate per reached state, the one
// with the lowest metric (lowest index on ties).
module tb_ava_acs;
  import ava_pkg::*;
  import ava_ref_pkg::*;
  localparam int NMAX = 4;
  localparam int NC = 2 * NMAX;
  path_t pm [NMAX];
  bm_t   bm_n [4];
  cand_t cand [NC];
  int checks = 0, failures = 0, merges = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ava_acs #(.NMAX(NMAX)) dut (.pm, .bm_n, .cand);

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (3000) begin
      int perm[8], es[NC], em[NC];
      bit ev[NC];
      for (int s = 0; s < 8; s++) perm[s] = s;
      perm.shuffle();
      for (int j = 0; j < NMAX; j++) begin
        pm[j].valid  = $urandom_range(0, 4) != 0;
        pm[j].state  = state_t'(perm[j]);
        pm[j].metric = metric_t'($urandom_range(0, 20));
      end
      for (int e = 0; e < 4; e++) bm_n[e] = bm_t'($urandom_range(0, 14));
      for (int c = 0; c < NC; c++) begin
        int j, b;
        j = c / 2; b = c % 2;
        es[c] = ((perm[j] << 1) | b) & 7;
        em[c] = int'(pm[j].metric) + int'(bm_n[branch_sym(perm[j], b)]);
        ev[c] = pm[j].valid;
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        bit win;
        win = ev[c];
        for (int o = 0; o < NC; o++)
          if (o != c && ev[o] && es[o] == es[c] && (em[o] < em[c] || (em[o] == em[c] && o < c)))
            win = 0;
        if (ev[c] && !win) merges++;
        chk(int'(cand[c].state) == es[c], $sformatf("cand %0d state", c));
        if (ev[c]) chk(int'(cand[c].metric) == em[c], $sformatf("cand %0d metric %0d exp %0d", c, cand[c].metric, em[c]));
        chk(cand[c].alive == win, $sformatf("cand %0d alive %0d exp %0d", c, cand[c].alive, win));
      end
    end
    chk(merges > 0, "no merge exercised");
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
