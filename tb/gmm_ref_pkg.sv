// gmm_ref_pkg: behavioural reference of the GMM background identification,
// written from the algorithm's equations for the testbenches. It works on
// plain integers (codes of the fixed-point formats) and uses the exact
// square of (pixel - mean) where the RTL uses a truncated multiplier, so a
// variance may differ by a few LSBs; callers compare it with a tolerance.
package gmm_ref_pkg;
  typedef struct {
    int w[3];
    int mu[3];
    int v[3];
    int ms[3];
  } rmodel_t;

  // sigma*4 by the four published-style segments (edges/coefficients as built)
  function automatic int ref_sigma(int v);
    if (v < 2)        return 11 + v / 4;
    else if (v < 24)  return 12 + 2 * v;
    else if (v < 384) return 47 + v / 2;
    else              return 215 + v / 8;
  endfunction

  function automatic int ref_shift(int w, int ashift);
    // nearest integer of log2(w/256 * 2^ashift), limited to 0..ashift
    real x;
    int  s;
    if (w == 0) return 0;
    x = $ln(real'(w) / 256.0 * real'(2 ** ashift)) / $ln(2.0);
    s = (x < 0.0) ? 0 : int'($floor(x + 0.5));
    if (s > ashift) s = ashift;
    if (s < 0) s = 0;
    return s;
  endfunction

  function automatic int ref_inv(int x);   // 256/msumtot, 4 segments
    int z;
    if (x == 0) x = 1;
    if (x < 3)       z = 384 - 128 * x;
    else if (x < 9)  z = 100 - 8 * x;
    else if (x < 24) z = 35 - x;
    else             z = 12 - x / 8;
    return (z > 255) ? 255 : z;
  endfunction

  function automatic int fdiv(int a, int s);  // floor(a / 2^s)
    return (a >= 0) ? (a >> s) : -((-a + (1 << s) - 1) >> s);
  endfunction

  // 1 when the pixel matches none of the three Gaussians
  function automatic bit ref_nm(int pixel, rmodel_t mi);
    for (int k = 0; k < 3; k++) begin
      int d;
      d = 4 * pixel - mi.mu[k];
      if (d < 0) d = -d;
      if (real'(d) < 2.5 * real'(ref_sigma(mi.v[k]))) return 0;
    end
    return 1;
  endfunction

  // one GMM step; returns fgbg, fills mo
  function automatic bit ref_step(input int pixel, input rmodel_t mi, output rmodel_t mo,
                                  input int ashift, input int tbg, input int vinit);
    int  sig[3], s[3];
    longint ifit[3];
    bit  m[3];
    int  ord[3];
    int  gu, t, ahead;
    bit  nm;
    mo = mi;
    for (int k = 0; k < 3; k++) begin
      int d;
      sig[k]  = ref_sigma(mi.v[k]);
      d       = 4 * pixel - mi.mu[k];
      if (d < 0) d = -d;
      m[k]    = (real'(d) < 2.5 * real'(sig[k]));
      s[k]    = ref_shift(mi.w[k], ashift);
      ifit[k] = longint'(mi.v[k]) * (longint'(1) << (2 * (ashift - s[k])));
      ord[k]  = k;
    end
    // stable sort by ascending ifit
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2 - i; j++)
        if (ifit[ord[j]] > ifit[ord[j+1]]) begin
          t = ord[j]; ord[j] = ord[j+1]; ord[j+1] = t;
        end
    nm = !(m[0] || m[1] || m[2]);
    gu = m[ord[0]] ? ord[0] : (m[ord[1]] ? ord[1] : ord[2]);
    // background decision
    ahead = 0;
    for (int i = 0; i < 3; i++) if (ord[i] == gu) break; else ahead += mi.w[ord[i]];
    // updates
    for (int k = 0; k < 3; k++) begin
      int wn;
      bit upd;
      upd = !nm && (k == gu);
      wn  = mi.w[k] - (mi.w[k] >> ashift) + (upd ? (256 >> ashift) : 0);
      mo.w[k] = (wn > 255) ? 255 : wn;
      if (upd) begin
        int d, sq, vn;
        d  = 4 * pixel - mi.mu[k];
        sq = int'($floor(real'(4 * d * d) / 512.0 + 0.5));
        mo.mu[k] = mi.mu[k] + fdiv(d, s[k]);
        vn = mi.v[k] + fdiv(sq - mi.v[k], s[k]);
        mo.v[k]  = (vn < 1) ? 1 : ((vn > 2047) ? 2047 : vn);
        mo.ms[k] = (mi.ms[k] == 15) ? 15 : mi.ms[k] + 1;
      end
    end
    if (nm) begin
      int g3;
      g3 = ord[2];
      mo.w[g3]  = ref_inv(mi.ms[ord[0]] + mi.ms[ord[1]]);
      mo.mu[g3] = 4 * pixel;
      mo.v[g3]  = vinit;
      mo.ms[g3] = 1;
    end
    return nm || (ahead > tbg);
  endfunction
endpackage
