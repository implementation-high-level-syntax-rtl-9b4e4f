// tb_dct_ref_pkg: reference model for the HEVC forward integer DCT
// testbenches.
//
// Coefficients are derived independently of the RTL package: the sign of
// C_N[k][n] comes from a floating-point cos((2n+1)k*pi/(2N)), its magnitude
// from the HEVC table of rounded values (64*sqrt(2)*cos(j*pi/64),
// j = 1..32), picking the entry whose cosine matches. The 1-D and 2-D
// references are direct matrix products (no butterflies) on 64-bit
// integers, with the encoder's rounding shifts and 16-bit saturation.
package tb_dct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int mag_tab(input int j);
    int t[33] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70,
                  67, 64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13,
                  9, 4, 0};
    return t[j];
  endfunction

  // C_S[k][n] for S = 1 << log2s.
  function automatic int ref_coef(input int log2s, input int k, input int n);
    real c, ac, best;
    int  bj, s;
    if (k == 0) return 64;
    s  = 1 << log2s;
    c  = $cos((2.0 * n + 1.0) * k * PI / (2.0 * s));
    ac = (c < 0.0) ? -c : c;
    best = 10.0;
    bj = 0;
    for (int j = 1; j <= 32; j++) begin
      real d;
      d = $cos(j * PI / 64.0) - ac;
      if (d < 0.0) d = -d;
      if (d < best) begin best = d; bj = j; end
    end
    return (c < 0.0) ? -mag_tab(bj) : mag_tab(bj);
  endfunction

  // y[g*S + k] = sum_n C_S[k][n] * x[g*S + n], for a vector of len samples.
  function automatic void ref_dct1d(input longint x[32], input int len,
                                    input int log2s, output longint y[32]);
    int s;
    s = 1 << log2s;
    for (int i = 0; i < 32; i++) y[i] = 0;
    for (int g = 0; g < len / s; g++)
      for (int k = 0; k < s; k++)
        for (int n = 0; n < s; n++)
          y[g*s+k] += longint'(ref_coef(log2s, k, n)) * x[g*s+n];
  endfunction

  function automatic longint rnd_sat(input longint v, input int sh, input int w);
    longint r, hi, lo;
    r  = (sh > 0) ? ((v + (64'sd1 <<< (sh - 1))) >>> sh) : v;
    hi = (64'sd1 <<< (w - 1)) - 1;
    lo = -(64'sd1 <<< (w - 1));
    return (r > hi) ? hi : (r < lo) ? lo : r;
  endfunction

  // 2-D forward transform of an n x n tile of equal s x s blocks:
  // horizontal pass, shift log2s-1+bd-8, then vertical pass, shift log2s+6.
  // z[r][c] is coefficient row r (vertical frequency), column c.
  function automatic void ref_dct2d(input longint x[32][32], input int n,
                                    input int log2s, input int bd,
                                    output longint z[32][32]);
    longint t[32][32];
    longint v[32], y[32];
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < 32; c++) v[c] = (c < n) ? x[r][c] : 0;
      ref_dct1d(v, n, log2s, y);
      for (int c = 0; c < n; c++) t[r][c] = rnd_sat(y[c], log2s - 1 + bd - 8, 16);
    end
    for (int c = 0; c < n; c++) begin
      for (int r = 0; r < 32; r++) v[r] = (r < n) ? t[r][c] : 0;
      ref_dct1d(v, n, log2s, y);
      for (int r = 0; r < n; r++) z[r][c] = rnd_sat(y[r], log2s + 6, 16);
    end
  endfunction

endpackage
