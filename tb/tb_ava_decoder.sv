// End-to-end test of the adaptive Viterbi decoder at its default size
// (NMAX = 4 survivors, path depth L = 20).
//
// A random message, followed by L+3 zeros that flush the encoder and the
// survivor memory, is convolutionally encoded, BPSK-modulated, corrupted by
// Gaussian noise and quantized to 3-bit soft symbols.  The symbols are fed to
// the decoder with in_valid held high (with a few random idle cycles).  For
// every stage the testbench runs the behavioural model of ava_ref_pkg and
// checks, cycle by cycle:
//   - the number of cycles the stage took (1 + threshold steps),
//   - the survivor count and the trim flag at the commit,
//   - every decoded bit, against the model and against the transmitted bit
//     (the latter only counted, since noise can cause real decoding errors;
//     a noiseless run must decode without error).
// Several runs use different thresholds, noise levels and run-time survivor
// limits (cfg_nmax = 1..4, and 0 meaning NMAX) so that every mechanism
// occurs: a limit below NMAX, threshold reduction, step back, trimming,
// merging paths, threshold purges, and stages that fit at once.
module tb_ava_decoder;
  import ava_pkg::*;
  import ava_ref_pkg::*;

  localparam int NMAX = 4;
  localparam int L    = 20;
  localparam int NC   = 2 * NMAX;

  logic clk = 1'b0;
  logic rst_n;
  thr_t cfg_t;
  logic [$clog2(NMAX):0] cfg_nmax;
  logic in_valid, in_ready;
  sym_t r0, r1;
  logic out_valid, out_bit;
  logic [NC-1:0] path_valid;
  logic [$clog2(NC):0] n_surv;
  thr_t t_cur;
  logic t_reduce, t_back, trim;

  ava_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters seen on the RTL
  int m_limit = 0, m_reduce = 0, m_back = 0, m_trim = 0, m_merge = 0, m_thr_drop = 0, m_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (t_reduce) m_reduce++;
    // a reduction that only the run-time limit asked for
    if (t_reduce && int'(dut.u_ctrl.count) <= NMAX) m_limit++;
    if (t_back) m_back++;
    if (trim) m_trim++;
    if (dut.commit) begin
      for (int c = 0; c < NC; c++) begin
        if (dut.u_acs.raw[c].alive && !dut.u_acs.cand[c].alive) m_merge++;
        if (dut.u_acs.cand[c].alive && !path_valid[c]) m_thr_drop++;
      end
    end
    if (out_valid) m_out++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // One complete decoding run; returns the number of bit errors versus the
  // transmitted message.  Inputs are driven just after the rising edge and
  // everything is sampled at the falling edge.
  task automatic run(input int nbits, input int thr, input real sigma, input int nm, output int errs);
    conv_enc enc;
    ava_ref  ref_m;
    int msg[$], q0s[$], q1s[$], outs[$];
    int total, sent, done, ncyc, open_cyc[$], open_idx[$];
    bit exp_out_valid, exp_out_bit, accept;
    enc   = new();
    ref_m = new(NMAX, L);
    errs  = 0;
    for (int i = 0; i < nbits; i++) msg.push_back($urandom_range(0, 1));
    for (int i = 0; i < L + 3; i++) msg.push_back(0);
    total = msg.size();
    foreach (msg[i]) begin
      int sym;
      sym = enc.push(msg[i]);
      q0s.push_back(quantize((sym >> 1) & 1, sigma));
      q1s.push_back(quantize(sym & 1, sigma));
    end

    rst_n = 1'b0; in_valid = 1'b0; cfg_t = thr_t'(thr); r0 = '0; r1 = '0;
    cfg_nmax = ($clog2(NMAX)+1)'(nm);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    sent = 0; done = 0; ncyc = 0; exp_out_valid = 1'b0; exp_out_bit = 1'b0;
    while (done < total || exp_out_valid) begin
      @(negedge clk);
      ncyc++;
      // registered output of the previous commit
      check(out_valid == exp_out_valid, $sformatf("out_valid at cycle %0d", ncyc));
      if (exp_out_valid) begin
        check(out_bit == exp_out_bit, $sformatf("out_bit of output %0d", outs.size()));
        outs.push_back(int'(out_bit));
      end
      exp_out_valid = 1'b0;
      if (dut.commit) begin
        int i;
        check(open_idx.size() > 0, "commit with no open stage");
        i = open_idx.pop_front();
        ref_m.step(q0s[i], q1s[i], thr, nm);
        check(ncyc - open_cyc.pop_front() == 1 + ref_m.reductions,
              $sformatf("stage %0d cycle count, expected %0d", i, 1 + ref_m.reductions));
        check(t_cur >= thr_t'(1), "threshold stays positive");
        check(int'(n_surv) == ref_m.survivors,
              $sformatf("stage %0d survivors %0d expected %0d", i, n_surv, ref_m.survivors));
        check(trim == ref_m.trimmed, $sformatf("stage %0d trim", i));
        begin
          int nv;
          nv = 0;
          for (int j = 0; j < NMAX; j++) nv += int'(dut.u_pm.pm_next[j].valid);
          check(nv <= ((nm == 0) ? NMAX : nm), $sformatf("stage %0d keeps %0d paths, limit %0d", i, nv, nm));
        end
        exp_out_valid = ref_m.out_valid;
        exp_out_bit   = ref_m.out_bit;
        done++;
      end else begin
        check((t_reduce || t_back) == (open_idx.size() > 0) && !(t_reduce && t_back),
              $sformatf("threshold step at cycle %0d", ncyc));
      end
      accept = in_valid && in_ready;
      if (accept) begin
        open_idx.push_back(sent);
        open_cyc.push_back(ncyc);
        sent++;
      end
      @(posedge clk);
      #1;
      if (accept || !in_valid) begin
        if (sent < total && $urandom_range(0, 9) != 0) begin
          in_valid = 1'b1; r0 = sym_t'(q0s[sent]); r1 = sym_t'(q1s[sent]);
        end else begin
          in_valid = 1'b0;
        end
      end
    end
    foreach (outs[n]) if (outs[n] != msg[n]) errs++;
    check(outs.size() == total - L, $sformatf("decoded %0d bits, expected %0d", outs.size(), total - L));
    $display("run: bits=%0d T=%0d N_max=%0d sigma=%0.2f errors=%0d steps=%0d backs=%0d trims=%0d cycles=%0d",
             nbits, thr, nm, sigma, errs, ref_m.n_reduce, ref_m.n_back, ref_m.n_trim, ncyc);
  endtask

  initial begin
    int e;
    run(300, 20, 0.0, 0, e);
    check(e == 0, "noiseless run must decode without error");
    run(300, 8, 0.0, 4, e);
    check(e == 0, "noiseless run at the smallest threshold must decode without error");
    run(600, 24, 0.5, 4, e);
    check(e < 30, "moderate noise: bit errors above 5%");
    run(600, 40, 0.8, 4, e);
    run(400, 12, 0.9, 0, e);
    // smaller run-time survivor limits
    run(400, 20, 0.0, 1, e);
    check(e == 0, "noiseless run with N_max = 1 must decode without error");
    run(500, 20, 0.6, 2, e);
    run(500, 16, 0.6, 3, e);
    $display("mechanisms: limit=%0d reduce=%0d back=%0d trim=%0d merge=%0d thr_drop=%0d outputs=%0d",
             m_limit, m_reduce, m_back, m_trim, m_merge, m_thr_drop, m_out);
    check(m_reduce > 0, "threshold reduction never happened");
    check(m_limit > 0, "a run-time N_max below NMAX never limited a stage");
    check(m_back > 0, "threshold step back never happened");
    check(m_trim > 0, "commit with trimming never happened");
    check(m_merge > 0, "path merge never happened");
    check(m_thr_drop > 0, "threshold purge never happened");
    check(m_out > 0, "no decoded output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
