// Test of the branch metric normalization: random sets of four metrics in
// 0..14 plus corner cases; each output must equal its input minus the
// smallest input.
module tb_ava_bm_norm;
  import ava_pkg::*;
  bm_t bm [4];
  bm_t bm_n [4];
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  ava_bm_norm dut (.bm, .bm_n);

  task automatic try_one(input int v[4]);
    int mn;
    mn = v[0];
    for (int e = 1; e < 4; e++) if (v[e] < mn) mn = v[e];
    for (int e = 0; e < 4; e++) bm[e] = bm_t'(v[e]);
    #1;
    for (int e = 0; e < 4; e++) begin
      checks++;
      if (int'(bm_n[e]) != v[e] - mn) begin
        failures++;
        $display("FAIL in %0d %0d %0d %0d e=%0d got %0d", v[0], v[1], v[2], v[3], e, bm_n[e]);
      end
    end
  endtask

  initial begin
    int v[4];
    v = '{14, 14, 14, 14}; try_one(v);
    v = '{0, 14, 7, 7};    try_one(v);
    v = '{14, 7, 7, 0};    try_one(v);
    v = '{9, 3, 11, 5};    try_one(v);
    repeat (500) begin
      for (int e = 0; e < 4; e++) v[e] = $urandom_range(0, 14);
      try_one(v);
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
