// Exhaustive test of the branch metric generator: all 64 soft symbol pairs,
// each of the four metrics compared with the sum of per-symbol distances
// (r for an expected 0, 7 - r for an expected 1).
module tb_ava_bmg;
  import ava_pkg::*;
  sym_t r0, r1;
  bm_t  bm [4];
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ava_bmg dut (.r0, .r1, .bm);

  initial begin
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        r0 = sym_t'(a); r1 = sym_t'(b);
        #1;
        for (int e = 0; e < 4; e++) begin
          int exp_bm;
          exp_bm = (e >= 2 ? 7 - a : a) + (e % 2 == 1 ? 7 - b : b);
          checks++;
          if (int'(bm[e]) != exp_bm) begin
            failures++;
            $display("FAIL r0=%0d r1=%0d e=%0d bm=%0d expected %0d", a, b, e, bm[e], exp_bm);
          end
        end
      end
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
