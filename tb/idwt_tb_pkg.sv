// idwt_tb_pkg -- reference arithmetic for the testbenches of the B-spline
// inverse DWT.
//
// The models here work on the plain one-dimensional sample stream, not on the
// two-phase pairs the hardware uses: a B-spline section is y[n] = x[n] +/- x[n-1]
// on the interleaved stream, a polyphase filter is a direct convolution. That
// makes them an independent description of what the circuit must compute.
// Word-level effects are modelled exactly: every word is W bits and wraps,
// every product is shifted right arithmetically by the product shift, and a
// halving section shifts its W+1 bit sum right by one.
package idwt_tb_pkg;

  typedef longint seq_t[$];

  // Real coefficients of the (10,18) synthesis bank, distributed part.
  localparam real V [1:8] = '{0.0076535, -0.0687398, 0.2681664, -0.6004576,
                              0.808888, -0.1154104, -0.57672, -1.0994};

  // Two's complement wrap of v to w bits.
  function automatic longint wrap(longint v, int w);
    longint m;
    m = longint'(1) << w;
    v = v & (m - 1);
    if (v >= (m >> 1)) v = v - m;
    return v;
  endfunction

  // Product of x and c, shifted right by sh, wrapped to w bits.
  function automatic longint prod(longint x, longint c, int sh, int w);
    return wrap((x * c) >>> sh, w);
  endfunction

  // One section (1 +/- z^-1) on the interleaved stream, optional halving.
  function automatic seq_t section(seq_t s, bit sub, bit shr, int w);
    seq_t o;
    longint prev, r;
    prev = 0;
    foreach (s[n]) begin
      r = sub ? s[n] - prev : s[n] + prev;
      if (shr) r = r >>> 1;
      o.push_back(wrap(r, w));
      prev = s[n];
    end
    return o;
  endfunction

  // A chain of n sections; bit j of mask halves in section j+1.
  function automatic seq_t chain(seq_t s, int n, bit sub, int unsigned mask, int w);
    for (int j = 0; j < n; j++) s = section(s, sub, mask[j], w);
    return s;
  endfunction

  // Symmetric FIR, serial (transposed) arithmetic: each tap's product is
  // shifted and wrapped on its own, then the products are summed.
  function automatic seq_t fir_serial(seq_t x, int c[], int sh, int w);
    seq_t y;
    longint acc;
    foreach (x[k]) begin
      acc = 0;
      for (int t = 0; t < c.size(); t++)
        if (k - t >= 0) acc = wrap(acc + prod(x[k-t], longint'(c[t]), sh, w), w);
      y.push_back(acc);
    end
    return y;
  endfunction

  // FIR, parallel (direct) arithmetic. For a symmetric coefficient set the
  // mirrored samples are added (and wrapped) first, then multiplied once;
  // otherwise every tap is multiplied on its own.
  function automatic seq_t fir_parallel(seq_t x, int c[], int sh, int w);
    seq_t y;
    longint acc, a, b;
    int n;
    bit sym;
    n = c.size();
    sym = 1'b1;
    for (int t = 0; t < n; t++) if (c[t] != c[n-1-t]) sym = 1'b0;
    if (!sym) return fir_serial(x, c, sh, w);
    foreach (x[k]) begin
      acc = 0;
      for (int u = 0; u < (n + 1) / 2; u++) begin
        a = (k - u >= 0) ? x[k-u] : 0;
        b = (2 * u == n - 1) ? 0 : ((k - (n - 1 - u) >= 0) ? x[k-(n-1-u)] : 0);
        acc = wrap(acc + prod(wrap(a + b, w), longint'(c[u]), sh, w), w);
      end
      y.push_back(acc);
    end
    return y;
  endfunction

  // Interleave two phase streams: e[0], o[0], e[1], o[1], ...
  function automatic seq_t interleave(seq_t e, seq_t o);
    seq_t s;
    foreach (e[k]) begin
      s.push_back(e[k]);
      s.push_back(o[k]);
    end
    return s;
  endfunction

  // Stimulus shared by the end-to-end testbenches, one entry per clock:
  //   [0, 40)          highpass impulse at pair 0 (shows the latency)
  //   [40, 80)         lowpass impulse at pair 40
  //   [80, 80+nrand)   random subband samples, |v| < 2^(w-2)
  //   then npr pairs   subbands of a random signal x from the analysis bank;
  //                    x[n] is sample n of that segment's own time axis.
  // hp_r is the highpass as a retimed circuit needs it (two clocks late
  // in the reconstruction segment), hp_n as the circuit without retiming
  // needs it. pr_start is the first pair of the reconstruction segment.
  function automatic void stimulus(int w, int nrand, int npr, int amp,
                                   ref seq_t lp, ref seq_t hp_r, ref seq_t hp_n,
                                   ref seq_t x, output int pr_start);
    seq_t lo, hi;
    longint v;
    lp.delete(); hp_r.delete(); hp_n.delete(); x.delete();
    for (int k = 0; k < 80; k++) begin
      lp.push_back(k == 40 ? 12000 : 0);
      v = (k == 0) ? 12000 : 0;
      hp_r.push_back(v);
      hp_n.push_back(v);
    end
    for (int k = 0; k < nrand; k++) begin
      lp.push_back(longint'($signed($urandom_range(0, 2 ** (w - 1) - 2))) - (2 ** (w - 2) - 1));
      v = longint'($signed($urandom_range(0, 2 ** (w - 1) - 2))) - (2 ** (w - 2) - 1);
      hp_r.push_back(v);
      hp_n.push_back(v);
    end
    pr_start = lp.size();
    for (int n = 0; n < 2 * npr; n++)
      x.push_back(longint'($signed($urandom_range(0, 2 * amp))) - longint'(amp));
    analysis(x, lo, hi);
    for (int k = 0; k < npr; k++) begin
      lp.push_back(lo[k]);
      hp_r.push_back(k >= 2 ? hi[k-2] : 0);
      hp_n.push_back(hi[k]);
    end
  endfunction

  // Real coefficient to fixed point, rounded to nearest.
  function automatic int quant(real v, int frac);
    return int'(v * (2.0 ** frac));
  endfunction

  // Real-valued synthesis filters Ht (18 taps) and Gt (10 taps, the version
  // without the four leading zero taps, i.e. as retimed).
  function automatic void synth_filters(output real ht[18], output real gt[10]);
    real q[9], r[5], t[18];
    q = '{V[1], V[2], V[3], V[4], V[5], V[4], V[3], V[2], V[1]};
    r = '{V[6], V[7], V[8], V[7], V[6]};
    foreach (t[i]) t[i] = (i < 9) ? q[i] : 0.0;
    for (int s = 0; s < 9; s++)
      for (int i = 17; i >= 1; i--) t[i] = t[i] + t[i-1];
    foreach (ht[i]) ht[i] = t[i] / 8.0;
    foreach (t[i]) t[i] = (i < 5) ? r[i] : 0.0;
    for (int s = 0; s < 5; s++)
      for (int i = 9; i >= 1; i--) t[i] = t[i] - t[i-1];
    foreach (gt[i]) gt[i] = t[i] / 4.0;
  endfunction

  // Bit-exact model of a general B-spline synthesis bank on the interleaved
  // stream: polyphase filters qe/qo (lowpass) and re/ro (highpass), chains of
  // gh sections (1+z^-1) and gg sections (1-z^-1) halving per the masks, the
  // highpass input delayed by hp_delay pairs. Returns y[0..2K-1] for K input
  // pairs without any pipeline delay (y[2k], y[2k+1] belong to pair k).
  function automatic seq_t idwt_model_gen(seq_t lp, seq_t hp, int qe[], int qo[],
                                          int re[], int ro[], int gh, int gg,
                                          int unsigned lmask, int unsigned hmask,
                                          bit par, int hp_delay, int w, int sh);
    seq_t hpx, a, b, y;
    hpx = hp;
    for (int i = 0; i < hp_delay; i++) begin
      hpx.push_front(0);
      void'(hpx.pop_back());
    end
    if (par) begin
      a = interleave(fir_parallel(lp, qe, sh, w), fir_parallel(lp, qo, sh, w));
      b = interleave(fir_parallel(hpx, re, sh, w), fir_parallel(hpx, ro, sh, w));
    end else begin
      a = interleave(fir_serial(lp, qe, sh, w), fir_serial(lp, qo, sh, w));
      b = interleave(fir_serial(hpx, re, sh, w), fir_serial(hpx, ro, sh, w));
    end
    a = chain(a, gh, 1'b0, lmask, w);
    b = chain(b, gg, 1'b1, hmask, w);
    for (int n = 0; n < 2 * lp.size(); n++) y.push_back(wrap(a[n] + b[n], w));
    return y;
  endfunction

  // Ideal (real-valued) response of the same general bank, coefficients taken
  // as c / 2^sh: y = Ht * up(lp) + z^(-2 hp_delay) Gt * up(hp) with
  // Ht = (1+z^-1)^gh Q / 2^|lmask|, Gt = (1-z^-1)^gg R / 2^|hmask|.
  function automatic void ideal_gen(seq_t lp, seq_t hp, int qe[], int qo[],
                                    int re[], int ro[], int gh, int gg,
                                    int unsigned lmask, int unsigned hmask,
                                    int hp_delay, int sh, ref real y[$]);
    real ht[$], gt[$], acc;
    ht.delete();
    gt.delete();
    for (int i = 0; i < 2 * ((qe.size() > qo.size()) ? qe.size() : qo.size()); i++)
      ht.push_back((i % 2 == 0) ? ((i / 2 < qe.size()) ? real'(qe[i/2]) : 0.0)
                                : ((i / 2 < qo.size()) ? real'(qo[i/2]) : 0.0));
    for (int i = 0; i < 2 * ((re.size() > ro.size()) ? re.size() : ro.size()); i++)
      gt.push_back((i % 2 == 0) ? ((i / 2 < re.size()) ? real'(re[i/2]) : 0.0)
                                : ((i / 2 < ro.size()) ? real'(ro[i/2]) : 0.0));
    for (int s = 0; s < gh; s++) begin
      ht.push_back(0.0);
      for (int i = ht.size() - 1; i >= 1; i--) ht[i] = ht[i] + ht[i-1];
    end
    for (int s = 0; s < gg; s++) begin
      gt.push_back(0.0);
      for (int i = gt.size() - 1; i >= 1; i--) gt[i] = gt[i] - gt[i-1];
    end
    foreach (ht[i]) ht[i] = ht[i] / (2.0 ** (sh + $countones(lmask)));
    foreach (gt[i]) gt[i] = gt[i] / (2.0 ** (sh + $countones(hmask)));
    y.delete();
    for (int n = 0; n < 2 * lp.size(); n++) begin
      acc = 0.0;
      foreach (ht[m])
        if (n - m >= 0 && (n - m) % 2 == 0) acc += ht[m] * real'(lp[(n-m)/2]);
      foreach (gt[m])
        if (n - m - 2 * hp_delay >= 0 && (n - m) % 2 == 0) acc += gt[m] * real'(hp[(n-m-2*hp_delay)/2]);
      y.push_back(acc);
    end
  endfunction

  // Bit-exact model of the (10,18) bank as built by idwt_bspline_top.
  function automatic seq_t idwt_model(seq_t lp, seq_t hp, bit par, bit retime,
                                      int w, int sh, int frac);
    int qe[], qo[], re[], ro[];
    qe = new[5];
    qo = new[4];
    re = new[3];
    ro = new[2];
    qe[0] = quant(V[1], frac); qe[1] = quant(V[3], frac); qe[2] = quant(V[5], frac);
    qe[3] = qe[1];             qe[4] = qe[0];
    qo[0] = quant(V[2], frac); qo[1] = quant(V[4], frac); qo[2] = qo[1]; qo[3] = qo[0];
    re[0] = quant(V[6], frac); re[1] = quant(V[8], frac); re[2] = re[0];
    ro[0] = quant(V[7], frac); ro[1] = ro[0];
    return idwt_model_gen(lp, hp, qe, qo, re, ro, 9, 5, 32'h0A8, 32'h00A, par,
                          retime ? 0 : 2, w, sh);
  endfunction

  // Ideal (real-valued) synthesis: y = Ht * up(lp) + z^+4 Gt_full * up(hp)
  // when retimed, y = Ht * up(lp) + Gt_full * up(hp) otherwise.
  function automatic void ideal_model(seq_t lp, seq_t hp, bit retime, ref real y[$]);
    real ht[18], gt[10], acc;
    int off;
    synth_filters(ht, gt);
    off = retime ? 0 : 4;
    y.delete();
    for (int n = 0; n < 2 * lp.size(); n++) begin
      acc = 0.0;
      for (int m = 0; m < 18; m++)
        if (n - m >= 0 && (n - m) % 2 == 0) acc += ht[m] * real'(lp[(n-m)/2]);
      for (int m = 0; m < 10; m++)
        if (n - m - off >= 0 && (n - m - off) % 2 == 0) acc += gt[m] * real'(hp[(n-m-off)/2]);
      y.push_back(acc);
    end
  endfunction

  // Analysis side of the (10,18) bank, for reconstruction tests. The analysis
  // filters follow from the synthesis ones: H(z) = -Gt_full(-z),
  // G(z) = Ht(-z), where Gt_full has the four leading zero taps. Subband
  // samples are lo[k] = sum_m H[m] x[2k-m], hi[k] likewise, rounded.
  // Through the synthesis bank the signal comes back as x[n-17].
  function automatic void analysis(seq_t x, ref seq_t lo, ref seq_t hi);
    real ht[18], gt[10], ha[14], ga[18], al, ah;
    synth_filters(ht, gt);
    foreach (ha[m]) ha[m] = (m < 4) ? 0.0 : -gt[m-4] * ((m % 2 != 0) ? -1.0 : 1.0);
    foreach (ga[m]) ga[m] = ht[m] * ((m % 2 != 0) ? -1.0 : 1.0);
    lo.delete();
    hi.delete();
    for (int k = 0; k < x.size() / 2; k++) begin
      al = 0.0;
      ah = 0.0;
      for (int m = 0; m < 14; m++) if (2 * k - m >= 0) al += ha[m] * real'(x[2*k-m]);
      for (int m = 0; m < 18; m++) if (2 * k - m >= 0) ah += ga[m] * real'(x[2*k-m]);
      lo.push_back(longint'($rtoi(al + (al >= 0.0 ? 0.5 : -0.5))));
      hi.push_back(longint'($rtoi(ah + (ah >= 0.0 ? 0.5 : -0.5))));
    end
  endfunction

endpackage
