// Test of the d_m search: random path metric arrays (random valid flags,
// metrics 0..63, many ties); d_m must be the smallest valid metric and best
// the lowest slot holding it.
module tb_ava_min_metric;
  import ava_pkg::*;
  localparam int NMAX = 4;
  path_t   pm [NMAX];
  metric_t d_m;
  logic [$clog2(NMAX)-1:0] best;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ava_min_metric #(.NMAX(NMAX)) dut (.pm, .d_m, .best);

  initial begin
    repeat (2000) begin
      int emin, ebest;
      emin = -1; ebest = 0;
      for (int j = 0; j < NMAX; j++) begin
        pm[j].valid  = ($urandom_range(0, 3) != 0) || j == 2;
        pm[j].state  = state_t'($urandom_range(0, 7));
        pm[j].metric = metric_t'($urandom_range(0, 15) * (1 + $urandom_range(0, 3)));
      end
      for (int j = NMAX - 1; j >= 0; j--)
        if (pm[j].valid && (emin < 0 || int'(pm[j].metric) <= emin)) begin
          emin = int'(pm[j].metric); ebest = j;
        end
      #1;
      checks++;
      if (int'(d_m) != emin || int'(best) != ebest) begin
        failures++;
        $display("FAIL d_m=%0d best=%0d expected %0d %0d", d_m, best, emin, ebest);
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
