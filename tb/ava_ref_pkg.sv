// Reference models for the adaptive Viterbi decoder testbenches.
//
// conv_enc      : the rate-1/2 K=4 encoder, written from the generator
//                 polynomials in octal (15,17), independently of ava_pkg.
// gauss         : approximately normal noise, sum of 12 uniforms minus 6.
// quantize      : BPSK sample (0 -> +1, 1 -> -1) to a 3-bit soft symbol,
//                 0 = confident '0', 7 = confident '1'.
// ava_ref       : a behavioural model of the decoder's algorithm, one call
//                 of step() per trellis stage.  It applies the same retention
//                 rules (merge to the best path per state, threshold d_m + T,
//                 T lowered by 2, one step back if none pass, first N_max kept,
//                 metrics rescaled by d_m, register-exchange output of depth
//                 L) with plain integers and queues, so that a testbench can compare
//                 the RTL with it bit for bit and cycle for cycle.
package ava_ref_pkg;

  // Encoder with its own shift register, newest bit at sr[0] after shifting.
  class conv_enc;
    int sr;   // 3 previous inputs, bit 0 newest
    function new(); sr = 0; endfunction
    // returns {c0, c1}
    function int push(int b);
      int w, c0, c1;
      w  = (sr << 1) | (b & 1);        // w[0] current, w[3] oldest
      // octal 15 = 1101 -> taps current, 1 and 3 stages back
      c0 = (w & 1) ^ ((w >> 1) & 1) ^ ((w >> 3) & 1);
      // octal 17 = 1111 -> all taps
      c1 = (w & 1) ^ ((w >> 1) & 1) ^ ((w >> 2) & 1) ^ ((w >> 3) & 1);
      sr = w & 7;
      return (c0 << 1) | c1;
    endfunction
  endclass

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
    return s - 6.0;
  endfunction

  function automatic int quantize(int c, real sigma);
    real y, q;
    int  qi;
    y  = (c != 0 ? -1.0 : 1.0) + sigma * gauss();
    q  = (1.0 - y) * 3.5;              // +1 -> 0, -1 -> 7
    qi = int'(q);                      // rounds to nearest
    if (qi < 0) qi = 0;
    if (qi > 7) qi = 7;
    return qi;
  endfunction

  // Expected symbol of a trellis branch, from a fresh encoder copy.
  function automatic int branch_sym(int s, int b);
    conv_enc e;
    e = new();
    e.sr = s;
    return e.push(b);
  endfunction

  class ava_ref;
    int nmax, l;
    bit valid[$];
    int st[$], met[$];
    bit path[$][$];                    // path[j][0] newest bit
    int fill;
    // results of the last step
    int reductions, survivors;        // reductions: all threshold steps
    bit trimmed, out_valid, out_bit;
    // event counters
    int n_merge, n_thr_drop, n_reduce, n_trim, n_back, n_stage_first_try;

    function new(int nmax_, int l_);
      nmax = nmax_; l = l_;
      for (int j = 0; j < nmax; j++) begin
        bit p[$];
        valid.push_back(j == 0); st.push_back(0); met.push_back(0);
        for (int k = 0; k < l; k++) p.push_back(1'b0);
        path.push_back(p);
      end
      fill = 0;
      n_merge = 0; n_thr_drop = 0; n_reduce = 0; n_trim = 0; n_back = 0; n_stage_first_try = 0;
    endfunction

    // lim_req: run-time survivor limit N_max (0 or above nmax means nmax)
    function void step(int r0, int r1, int t0, int lim_req = 0);
      int bm[4], bmin, dm, best;
      bit found;
      int cst[], cm[], t, cnt, k, backs, lim;
      bit ca[];
      bit nv[$];
      int ns[$], nm[$];
      bit np[$][$];
      cst = new[2*nmax]; cm = new[2*nmax]; ca = new[2*nmax];
      lim = (lim_req <= 0 || lim_req > nmax) ? nmax : lim_req;
      // branch metrics, normalized
      for (int e = 0; e < 4; e++)
        bm[e] = (((e >> 1) != 0) ? 7 - r0 : r0) + (((e & 1) != 0) ? 7 - r1 : r1);
      bmin = bm[0];
      foreach (bm[e]) if (bm[e] < bmin) bmin = bm[e];
      foreach (bm[e]) bm[e] -= bmin;
      // d_m over the stored survivors
      found = 0; dm = 0; best = 0;
      for (int j = 0; j < nmax; j++)
        if (valid[j] && (!found || met[j] < dm)) begin found = 1; dm = met[j]; best = j; end
      // candidates
      for (int c = 0; c < 2*nmax; c++) begin
        int j, b;
        j = c / 2; b = c % 2;
        cst[c] = ((st[j] << 1) | b) & 7;
        cm[c]  = met[j] + bm[branch_sym(st[j], b)];
        ca[c]  = valid[j];
      end
      // merge: per state keep the best, first on ties
      for (int s = 0; s < 8; s++) begin
        int win;
        win = -1;
        for (int c = 0; c < 2*nmax; c++)
          if (ca[c] && cst[c] == s && (win < 0 || cm[c] < cm[win])) win = c;
        for (int c = 0; c < 2*nmax; c++)
          if (ca[c] && cst[c] == s && c != win) begin ca[c] = 0; n_merge++; end
      end
      // threshold iteration: down by 2 while too many pass; one step back
      // up if a step leaves none; stop with too many once T <= 2
      t = (t0 < 8) ? 8 : t0;
      reductions = 0;
      backs = 0;
      forever begin
        cnt = 0;
        for (int c = 0; c < 2*nmax; c++) if (ca[c] && cm[c] < dm + t) cnt++;
        if (backs > 0) break;
        if (cnt >= 1 && cnt <= lim) break;
        if (cnt > lim && t <= 2) break;
        if (cnt == 0) begin t += 2; backs++; end
        else t -= 2;
        reductions++;
      end
      n_back += backs;
      survivors = cnt;
      trimmed = (cnt > lim);
      n_reduce += reductions;
      n_trim += int'(trimmed);
      if (reductions == 0) n_stage_first_try++;
      for (int c = 0; c < 2*nmax; c++) if (ca[c] && !(cm[c] < dm + t)) n_thr_drop++;
      // output from the stage being replaced
      out_valid = (fill == l);
      out_bit   = path[best][l-1];
      if (fill < l) fill++;
      // purge and pack
      k = 0;
      for (int c = 0; c < 2*nmax; c++)
        if (ca[c] && cm[c] < dm + t && k < lim) begin
          bit p[$];
          p = path[c/2];
          void'(p.pop_back());
          p.push_front(c[0]);
          nv.push_back(1); ns.push_back(cst[c]); nm.push_back(cm[c] - dm); np.push_back(p);
          k++;
        end
      while (k < nmax) begin
        nv.push_back(0); ns.push_back(0); nm.push_back(0); np.push_back(path[0]);
        k++;
      end
      valid = nv; st = ns; met = nm; path = np;
    endfunction
  endclass

endpackage
