// mmf_ref_pkg: bit-accurate reference arithmetic for the MMF-LSD testbenches.
//
// Plain integer models of the detector's number formats, written directly
// from the definitions (not from the RTL structure): PAM symbol values,
// saturated b, saturated error magnitude, PED increment, Schnorr-Euchner
// ranking and the full fixed-point Euclidean distance of a symbol vector.
package mmf_ref_pkg;
  import mmf_pkg::*;

  function automatic longint symv(input int k, input int qlog);
    return 2 * k - ((1 << qlog) - 1);
  endfunction

  function automatic longint sat_s(input longint v, input int bits);
    longint hi, lo;
    hi = (longint'(1) << (bits - 1)) - 1;
    lo = -(longint'(1) << (bits - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  // b for layer row given symbol indices x (only j > row used)
  function automatic longint ref_b(input wmat_t r, input wvec_t y, input symvec_t x,
                                   input int row, input int mt, input int qlog);
    longint acc;
    acc = longint'($signed(y[row]));
    for (int j = row + 1; j < mt; j++) acc -= longint'($signed(r[row][j])) * symv(int'(x[j]), qlog);
    return sat_s(acc, W);
  endfunction

  function automatic longint ref_abs_e(input longint b, input longint rii, input int k, input int qlog);
    longint e;
    e = b - rii * symv(k, qlog);
    if (e < 0) e = -e;
    if (e > (longint'(1) << W) - 1) e = (longint'(1) << W) - 1;
    return e;
  endfunction

  function automatic longint ref_inc(input longint ae);
    longint s;
    s = (ae * ae) >>> FRAC;
    if (s > longint'(PED_MAX)) s = longint'(PED_MAX);
    return s;
  endfunction

  function automatic longint ped_sat(input longint v);
    return v > longint'(PED_MAX) ? longint'(PED_MAX) : v;
  endfunction

  // symbol of SE rank n for error magnitudes of all Q symbols (-1 if none)
  function automatic int ref_rank_sym(input longint b, input longint rii, input int n, input int qlog);
    int q;
    q = 1 << qlog;
    for (int k = 0; k < q; k++) begin
      int c;
      c = 0;
      for (int m = 0; m < q; m++)
        if (m != k && (ref_abs_e(b, rii, m, qlog) < ref_abs_e(b, rii, k, qlog) ||
            (ref_abs_e(b, rii, m, qlog) == ref_abs_e(b, rii, k, qlog) && m < k))) c++;
      if (c == n) return k;
    end
    return -1;
  endfunction

  // fixed-point ED of a complete symbol vector, layer by layer from the top
  function automatic longint ref_ed(input wmat_t r, input wvec_t y, input symvec_t x,
                                    input int mt, input int qlog);
    longint d, b;
    d = 0;
    for (int i = mt - 1; i >= 0; i--) begin
      b = ref_b(r, y, x, i, mt, qlog);
      d = ped_sat(d + ref_inc(ref_abs_e(b, longint'($signed(r[i][i])), int'(x[i]), qlog)));
    end
    return d;
  endfunction

  // random upper-triangular channel with a dominant positive diagonal and a
  // received vector y = R x + noise for random symbols x (returned)
  function automatic void gen_channel(input int mt, input int qlog, input int noise_amp,
                                      output wmat_t r, output wvec_t y, output symvec_t xt);
    longint acc;
    int nz;
    r  = '0;
    y  = '0;
    xt = '0;
    for (int i = 0; i < mt; i++) xt[i] = sym_t'($urandom_range((1 << qlog) - 1));
    for (int i = 0; i < mt; i++) begin
      r[i][i] = word_t'($urandom_range(2 << FRAC, 1 << FRAC) / 2 + (1 << (FRAC - 1)));
      for (int j = i + 1; j < mt; j++)
        r[i][j] = word_t'(int'($urandom_range(1 << FRAC)) - (1 << (FRAC - 1)));
    end
    for (int i = 0; i < mt; i++) begin
      acc = 0;
      for (int j = i; j < mt; j++) acc += longint'($signed(r[i][j])) * symv(int'(xt[j]), qlog);
      nz  = int'($urandom_range(2 * noise_amp)) - noise_amp;
      acc += longint'(nz);
      y[i] = word_t'(sat_s(acc, W));
    end
  endfunction
endpackage
