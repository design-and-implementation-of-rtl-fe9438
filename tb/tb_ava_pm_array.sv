// Test of the path metric array: reset contents (slot 0 valid in state 0
// with metric 0, the rest invalid), loading on load, holding otherwise.
module tb_ava_pm_array;
  import ava_pkg::*;
  localparam int NMAX = 4;
  logic clk = 1'b0, rst_n, load;
  path_t pm_next [NMAX];
  path_t pm [NMAX];
  path_t expv [NMAX];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ava_pm_array #(.NMAX(NMAX)) dut (.clk, .rst_n, .load, .pm_next, .pm);

  task automatic compare(input string s);
    for (int j = 0; j < NMAX; j++) begin
      checks++;
      if (pm[j] != expv[j]) begin failures++; $display("FAIL %s slot %0d", s, j); end
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0;
    for (int j = 0; j < NMAX; j++) pm_next[j] = '0;
    #12;
    for (int j = 0; j < NMAX; j++) expv[j] = '0;
    expv[0].valid = 1'b1;
    compare("reset");
    rst_n = 1'b1;
    repeat (300) begin
      @(negedge clk);
      load = 1'($urandom_range(0, 1));
      for (int j = 0; j < NMAX; j++) pm_next[j] = path_t'($urandom);
      @(posedge clk); #1;
      if (load) expv = pm_next;
      compare("after edge");
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
