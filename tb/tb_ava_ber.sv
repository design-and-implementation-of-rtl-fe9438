// Bit error rate sweep of the adaptive Viterbi decoder at default size.
//
// Reproduces the test system the decoder is meant for: random source bits,
// rate-1/2 K=4 encoder (15,17), BPSK (0 -> +1, 1 -> -1), additive white
// Gaussian noise and a 3-bit quantizer, followed by the decoder.  Eb/N0 runs
// from 1 dB to 7 dB; the noise standard deviation for unit-amplitude BPSK at
// code rate R is sigma = sqrt(1 / (2 R Eb/N0)).  Symbols are offered back to
// back.  At every point:
//   - every decoded bit must equal the behavioural model of ava_ref_pkg,
//   - the decoded BER is reported next to the raw (hard-decision) channel
//     bit error rate,
// and over the sweep the decoder must beat the raw channel from 4 dB up and
// decode the 7 dB point with a BER below 1e-2.
module tb_ava_ber;
  import ava_pkg::*;
  import ava_ref_pkg::*;

  localparam int NMAX  = 4;
  localparam int L     = 20;
  localparam int NBITS = 3000;
  localparam int THR   = 30;

  logic clk = 1'b0;
  logic rst_n;
  thr_t cfg_t;
  logic [$clog2(NMAX):0] cfg_nmax;
  logic in_valid, in_ready;
  sym_t r0, r1;
  logic out_valid, out_bit;
  logic [2*NMAX-1:0] path_valid;
  logic [$clog2(2*NMAX):0] n_surv;
  thr_t t_cur;
  logic t_reduce, t_back, trim;

  ava_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic point(input real ebn0_db, output real ber, output real raw);
    conv_enc enc;
    ava_ref  ref_m;
    int msg[$], q0s[$], q1s[$], exp_bits[$], outs[$];
    int total, sent, errs, raw_errs, cycles;
    real sigma;
    enc   = new();
    ref_m = new(NMAX, L);
    sigma = $sqrt(1.0 / (2.0 * 0.5 * (10.0 ** (ebn0_db / 10.0))));
    for (int i = 0; i < NBITS; i++) msg.push_back($urandom_range(0, 1));
    for (int i = 0; i < L + 3; i++) msg.push_back(0);
    total = msg.size();
    raw_errs = 0;
    foreach (msg[i]) begin
      int sym, a, b;
      sym = enc.push(msg[i]);
      a = quantize((sym >> 1) & 1, sigma);
      b = quantize(sym & 1, sigma);
      raw_errs += int'((a >= 4) != (((sym >> 1) & 1) != 0)) + int'((b >= 4) != ((sym & 1) != 0));
      q0s.push_back(a); q1s.push_back(b);
      ref_m.step(a, b, THR);
      if (ref_m.out_valid) exp_bits.push_back(int'(ref_m.out_bit));
    end

    rst_n = 1'b0; in_valid = 1'b0; cfg_t = thr_t'(THR); r0 = '0; r1 = '0;
    cfg_nmax = ($clog2(NMAX)+1)'(NMAX);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    sent = 0; cycles = 0;
    while (outs.size() < exp_bits.size() && cycles < 40 * total) begin
      if (sent < total) begin
        in_valid = 1'b1; r0 = sym_t'(q0s[sent]); r1 = sym_t'(q1s[sent]);
      end else begin
        in_valid = 1'b0;
      end
      @(negedge clk);
      if (out_valid) outs.push_back(int'(out_bit));
      if (in_valid && in_ready) sent++;
      @(posedge clk);
      #1;
      cycles++;
    end
    check(outs.size() == exp_bits.size(), "number of decoded bits");
    errs = 0;
    foreach (outs[n]) begin
      check(outs[n] == exp_bits[n], $sformatf("Eb/N0 %0.1f bit %0d differs from model", ebn0_db, n));
      if (outs[n] != msg[n]) errs++;
    end
    ber = real'(errs) / real'(outs.size());
    raw = real'(raw_errs) / real'(2 * total);
    $display("Eb/N0 = %0.1f dB  sigma = %0.3f  raw BER = %0.4f  decoded BER = %0.5f  (%0d errors, %0d cycles for %0d stages, %0d reductions)",
             ebn0_db, sigma, raw, ber, errs, cycles, total, ref_m.n_reduce);
  endtask

  initial begin
    real ber, raw;
    for (int db = 1; db <= 7; db++) begin
      point(real'(db), ber, raw);
      if (db >= 4) check(ber < raw, $sformatf("no coding gain at %0d dB", db));
      if (db == 7) check(ber < 1.0e-2, "BER at 7 dB above 1e-2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
