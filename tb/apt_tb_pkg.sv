// apt_tb_pkg: reference models for the APT testbenches.
//
// lut_ref computes the default logarithm table from its formula with real
// arithmetic; lcu_ref computes the LUT-based logarithm of an operand with
// plain integer arithmetic; apt_ref runs the whole recursive threshold
// selection on a histogram. None of them uses the RTL.
package apt_tb_pkg;

  typedef bit [27:0] word_t;
  typedef word_t table_t [16];

  function automatic real log2r(input real x);
    return $ln(x) / $ln(2.0);
  endfunction

  function automatic word_t lut_ref(input int k);
    real x0, b, s, xm, dev;
    int beta, da, db, dc, dd;
    x0  = k / 16.0;
    b   = log2r(1.0 + x0);
    s   = 16.0 * (log2r(1.0 + (k + 1) / 16.0) - b);
    xm  = 1.0 / (s * $ln(2.0)) - 1.0;
    dev = log2r(1.0 + xm) - (b + s * (xm - x0));
    beta = $rtoi((b + dev / 2.0) * 4096.0 + 0.5);
    da = $rtoi(64.0 * s + 0.5);
    db = $rtoi(16.0 * s + 0.5);
    dc = $rtoi(4.0 * s + 0.5);
    dd = $rtoi(s + 0.5);
    return {beta[11:0], da[6:0], db[4:0], dc[2:0], dd[0]};
  endfunction

  function automatic table_t default_table();
    table_t t;
    for (int k = 0; k < 16; k++) t[k] = lut_ref(k);
    return t;
  endfunction

  // log2(q) in units of 2^-12; q must be non-zero.
  function automatic longint lcu_ref(input longint unsigned q, input table_t t);
    int j;
    longint unsigned f, fr;
    word_t w;
    j = 0;
    for (int i = 0; i < 64; i++) if (q[i]) j = i;
    if (j >= 12) f = (q >> (j - 12)) & 64'hfff;
    else         f = (q << (12 - j)) & 64'hfff;
    w  = t[f >> 8];
    fr = longint'(w[27:16])
       + longint'(w[15:9]) * ((f >> 6) & 3)
       + longint'(w[8:4])  * ((f >> 4) & 3)
       + longint'(w[3:1])  * ((f >> 2) & 3)
       + longint'(w[0])    * (f & 3);
    if (fr > 4095) fr = 4095;
    return longint'(j) * 4096 + longint'(fr);
  endfunction

  // Best split of the sub-image {0..T}: returns 0 if none is valid.
  function automatic bit best_split(input longint c[256], input longint s[256],
                                    input int T, input table_t tb,
                                    output int best_t, output longint best_sc,
                                    output int skipped);
    longint wt, ut, w, u, pa, pb, d, e, sc;
    bit found;
    wt = c[T] >> 6;
    ut = s[T] >> 6;
    found = 0; best_t = 0; best_sc = 0; skipped = 0;
    for (int t = 0; t < T; t++) begin
      w = c[t] >> 6;
      u = s[t] >> 6;
      pa = w * ut;
      pb = u * wt;
      d = (pa >= pb) ? pa - pb : pb - pa;
      e = wt - w;
      if (w == 0 || e == 0 || d == 0) begin
        skipped++;
        continue;
      end
      sc = 2 * lcu_ref(d, tb) - lcu_ref(w, tb) - lcu_ref(e, tb);
      if (!found || sc > best_sc) begin
        found = 1; best_sc = sc; best_t = t;
      end
    end
    return found;
  endfunction

  typedef struct {
    int     thresh;
    bit     found;
    int     iterations;
    int     reason;      // 1 CLF, 2 empty, 3 iteration limit
    longint log_sb2;
    int     skipped;     // candidates skipped over all iterations
  } apt_result_t;

  function automatic apt_result_t apt_ref(input longint hist[256], input int alpha,
                                          input int max_iter, input table_t tb);
    apt_result_t r;
    longint c[256], s[256];
    longint ca, sa, bs, lim, wt, ut;
    int T, bt, sk;
    ca = 0; sa = 0;
    for (int i = 0; i < 256; i++) begin
      ca += hist[i]; sa += i * hist[i];
      c[i] = ca; s[i] = sa;
    end
    r = '{thresh: 0, found: 0, iterations: 0, reason: 0, log_sb2: 0, skipped: 0};
    T = 255;
    forever begin
      if (!best_split(c, s, T, tb, bt, bs, sk)) begin
        r.skipped += sk;
        r.reason = 2;
        return r;
      end
      r.skipped += sk;
      wt = c[T] >> 6;
      ut = s[T] >> 6;
      r.iterations++;
      r.thresh = bt;
      r.found = 1;
      r.log_sb2 = bs - 2 * lcu_ref(wt, tb);
      if (alpha * ut != 0) begin
        lim = lcu_ref(alpha * ut, tb) + lcu_ref(wt, tb) - 4 * 4096;
        if (bs <= lim) begin
          r.reason = 1;
          return r;
        end
      end
      if (r.iterations >= max_iter) begin
        r.reason = 3;
        return r;
      end
      T = bt;
    end
  endfunction

endpackage
