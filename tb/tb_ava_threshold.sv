// Test of the threshold check: random candidates, d_m and T, including
// metrics right at the limit; a candidate must pass exactly when it is alive
// and its metric is strictly below d_m + T, and count must be the number of
// passing candidates.
module tb_ava_threshold;
  import ava_pkg::*;
  localparam int NMAX = 4;
  localparam int NC = 2 * NMAX;
  cand_t   cand [NC];
  metric_t d_m;
  thr_t    t_cur;
  logic [NC-1:0] pass;
  logic [$clog2(NC):0] count;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ava_threshold #(.NMAX(NMAX)) dut (.cand, .d_m, .t_cur, .pass, .count);

  initial begin
    repeat (3000) begin
      int dm, t, n;
      dm = $urandom_range(0, 60);
      t  = $urandom_range(8, 63);
      d_m = metric_t'(dm); t_cur = thr_t'(t);
      n = 0;
      for (int c = 0; c < NC; c++) begin
        cand[c].alive  = $urandom_range(0, 5) != 0;
        cand[c].state  = state_t'($urandom_range(0, 7));
        // bias towards the limit
        cand[c].metric = metric_t'(dm + t - 2 + $urandom_range(0, 3) - (($urandom_range(0, 1) != 0) ? $urandom_range(0, t) : 0));
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        bit e;
        e = cand[c].alive && (int'(cand[c].metric) < dm + t);
        n += e;
        checks++;
        if (pass[c] != e) begin
          failures++;
          $display("FAIL c=%0d metric=%0d dm=%0d t=%0d pass=%0d", c, cand[c].metric, dm, t, pass[c]);
        end
      end
      checks++;
      if (int'(count) != n) begin
        failures++;
        $display("FAIL count %0d expected %0d", count, n);
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
