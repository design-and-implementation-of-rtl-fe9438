// Test of the register-exchange survivor memory at a reduced depth L = 6.
// Random src vectors and best slots are applied on random commits; a queue
// model of each slot's path predicts the decoded bit (oldest bit of the best
// path), out_valid (only once L stages are stored) and the path contents.
module tb_ava_path_mem;
  import ava_pkg::*;
  localparam int NMAX = 4;
  localparam int L = 6;
  localparam int NC = 2 * NMAX;
  logic clk = 1'b0, rst_n, commit;
  logic [$clog2(NC)-1:0] src [NMAX];
  logic [$clog2(NMAX)-1:0] best;
  logic out_valid, out_bit;
  bit   mp [NMAX][L];        // mp[j][0] newest
  int   fill = 0;
  int checks = 0, failures = 0, outs = 0;
  always #5 clk = ~clk;

  ava_path_mem #(.NMAX(NMAX), .L(L)) dut (.*);

  initial begin
    rst_n = 1'b0; commit = 1'b0; best = '0;
    foreach (src[j]) src[j] = '0;
    foreach (mp[j, k]) mp[j][k] = 1'b0;
    #12 rst_n = 1'b1;
    repeat (500) begin
      bit ev, eb;
      bit np [NMAX][L];
      @(negedge clk);
      commit = $urandom_range(0, 3) != 0;
      best = 2'($urandom_range(0, NMAX - 1));
      foreach (src[j]) src[j] = 3'($urandom_range(0, NC - 1));
      ev = commit && fill == L;
      eb = mp[best][L-1];
      if (commit) begin
        for (int j = 0; j < NMAX; j++) begin
          np[j][0] = src[j][0];
          for (int k = 1; k < L; k++) np[j][k] = mp[src[j] / 2][k-1];
        end
        mp = np;
        if (fill < L) fill++;
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid != ev || (ev && out_bit != eb)) begin
        failures++;
        $display("FAIL out_valid=%0d out_bit=%0d expected %0d %0d", out_valid, out_bit, ev, eb);
      end
      outs += ev;
    end
    checks++;
    if (outs == 0) begin failures++; $display("FAIL no output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
