// nr_ref_pkg: bit-exact reference model of the noise-reduction algorithm,
// written independently of the RTL for the testbenches.
//
// All arithmetic is done on 64-bit integers. Quantisation divides by a
// power of two with SystemVerilog integer division (which truncates toward
// zero, i.e. sign-magnitude truncation) and clamps to the symmetric range.
package nr_ref_pkg;

  // Counters of rare events seen by the model (for coverage in tests).
  int unsigned n_k_sat   = 0;   // coefficient update hit the +/- limit
  int unsigned n_q_sat   = 0;   // a quantisation saturated
  int unsigned n_q_negtr = 0;   // a negative value lost fraction bits
  int unsigned n_p_sat   = 0;   // power estimate saturated

  function automatic longint qtz(longint v, int frac, int w);
    longint d, lim;
    d   = v / (longint'(1) << frac);
    lim = (longint'(1) << (w - 1)) - 1;
    if (v < 0 && d * (longint'(1) << frac) != v) n_q_negtr++;
    if (d > lim)  begin d = lim;  n_q_sat++; end
    if (d < -lim) begin d = -lim; n_q_sat++; end
    return d;
  endfunction

  function automatic longint eta_upd(longint p, longint e);
    longint r;
    if (e < 0) e = 0;
    r = p - p / 64 - p / 256 + e / 64;
    if (r > 64'hFFFF_FFFF) begin r = 64'hFFFF_FFFF; n_p_sat++; end
    return r;
  endfunction

  function automatic int log2f(longint p);
    int s;
    s = 0;
    while (p > 1) begin p = p / 2; s++; end
    return s;
  endfunction

  function automatic longint k_upd(longint k, longint c, int s, int mu);
    int sh;
    longint dk, r;
    sh = s + mu - 15;
    if (sh < 0) sh = 0;
    dk = c / (longint'(1) << sh);
    if (dk > 65535)  dk = 65535;
    if (dk < -65535) dk = -65535;
    r = k + dk;
    if (r > 32767)  begin r = 32767;  n_k_sat++; end
    if (r < -32767) begin r = -32767; n_k_sat++; end
    return r;
  endfunction

  class nr_model;
    int     m, mu;
    longint k[], d[], p[], a[], sd[], kf[];
    longint beta, gamma;

    function new(int m_, int mu_, longint beta_, longint gamma_);
      m = m_; mu = mu_; beta = beta_; gamma = gamma_;
      k = new[m]; d = new[m]; p = new[m]; a = new[m]; sd = new[m]; kf = new[m];
      foreach (k[i]) begin k[i] = 0; d[i] = 0; p[i] = 0; a[i] = 0; sd[i] = 0; end
    endfunction

    // Decorrelator: one sample, updates k.
    function automatic longint decor(longint x);
      longint f, bcur, bd, fi, bi, e, c;
      f = x; bcur = x;
      for (int i = 0; i < m; i++) begin
        bd = d[i];
        fi = qtz(f * 32768 - k[i] * bd, 15, 16);
        bi = qtz(bd * 32768 - k[i] * f, 15, 16);
        e  = f * f + bd * bd;
        p[i] = eta_upd(p[i], e);
        c  = fi * bd + bi * f;
        k[i] = k_upd(k[i], c, (p[i] == 0) ? 0 : log2f(p[i]), mu);
        d[i] = bcur;
        f = fi; bcur = bi;
      end
      return f;
    endfunction

    // Analysis and synthesis with coefficients kc.
    function automatic longint filt(longint x, longint kc[]);
      longint fa, apend, b, fold, bq, fs;
      fa = x; apend = x;
      for (int s = 0; s < m; s++) begin
        b = a[s]; a[s] = apend; fold = fa;
        fa = qtz(fa * 32768 - kc[s] * b, 15, 16);
        if (s < m - 1) begin
          bq = qtz(b * 32768 - kc[s] * fold, 15, 16);
          apend = qtz(beta * bq, 15, 16);
        end
      end
      fs = fa;
      for (int s = m - 1; s >= 0; s--) begin
        b  = sd[s];
        fs = qtz(fs * 32768 + kc[s] * b, 15, 16);
        if (s < m - 1) begin
          bq = qtz(b * 32768 - kc[s] * fs, 15, 16);
          sd[s + 1] = qtz(gamma * bq, 15, 16);
        end
      end
      sd[0] = fs;
      return fs;
    endfunction

    // One sampling interval of the core: filters use the old coefficients.
    function automatic longint step(longint x);
      longint y, unused;
      foreach (kf[i]) kf[i] = k[i];
      y = filt(x, kf);
      unused = decor(x);
      return y;
    endfunction
  endclass

endpackage
