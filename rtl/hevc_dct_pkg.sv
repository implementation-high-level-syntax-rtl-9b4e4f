// hevc_dct_pkg: constants, types and coefficient functions shared by the
// HEVC integer DCT datapath.
//
// The HEVC core transform of size N (4, 8, 16 or 32) is an integer matrix
// C_N whose rows are scaled, hand-rounded cosines. Every smaller matrix is
// embedded in the 32-point one: C_N[k][n] = C_32[k*32/N][n]. Entry
// C_32[k][n] depends only on the angle index m = (2n+1)*k mod 128, i.e. on
// cos(m*pi/64); row 0 is 64 everywhere. The 33 magnitudes for m = 0..32 are
// the HEVC standard's values (16 distinct odd-angle values of the 32-point
// transform, 8 of the 16-point, 4 of the 8-point, then 83, 64, 36). They
// are expanded to any (N, k, n) by the cosine symmetries below, so no
// coefficient table of the full matrix is stored anywhere.
//
// The transform sizes are carried as log2 values in a small enum.
package hevc_dct_pkg;

  // Transform size, as log2(N).
  typedef enum logic [2:0] {
    TS_4  = 3'd2,
    TS_8  = 3'd3,
    TS_16 = 3'd4,
    TS_32 = 3'd5
  } tsize_e;

  // Magnitude of 64*sqrt(2)*cos(m*pi/64) as rounded by the HEVC standard,
  // for m = 1..32 (m = 0 is the DC row's 64).
  function automatic int cos_mag(input int m);
    case (m)
      0:  return 64;
      1:  return 90;  2:  return 90;  3:  return 90;  4:  return 89;
      5:  return 88;  6:  return 87;  7:  return 85;  8:  return 83;
      9:  return 82;  10: return 80;  11: return 78;  12: return 75;
      13: return 73;  14: return 70;  15: return 67;  16: return 64;
      17: return 61;  18: return 57;  19: return 54;  20: return 50;
      21: return 46;  22: return 43;  23: return 38;  24: return 36;
      25: return 31;  26: return 25;  27: return 22;  28: return 18;
      29: return 13;  30: return 9;   31: return 4;   32: return 0;
      default: return 0;
    endcase
  endfunction

  // Entry C_32[k][n] of the 32-point HEVC core transform matrix.
  function automatic int c32(input int k, input int n);
    int m;
    if (k == 0) return 64;
    m = ((2 * n + 1) * k) % 128;
    if (m <= 32)      return  cos_mag(m);
    else if (m <= 64) return -cos_mag(64 - m);
    else if (m <= 96) return -cos_mag(m - 64);
    else              return  cos_mag(128 - m);
  endfunction

  // Entry C_N[k][n] of the N-point matrix, N = 1 << log2n.
  function automatic int cmat(input int log2n, input int k, input int n);
    return c32(k << (5 - log2n), n);
  endfunction

  // Forward-transform scaling of the HEVC reference encoder: the first
  // (horizontal) pass is shifted right by log2(N) - 1 + bitDepth - 8, the
  // second (vertical) pass by log2(N) + 6, both with round-half-up.
  function automatic int shift_stage1(input int log2n, input int bit_depth);
    return log2n - 1 + bit_depth - 8;
  endfunction

  function automatic int shift_stage2(input int log2n);
    return log2n + 6;
  endfunction

  // Arithmetic right shift by sh with rounding offset 1 << (sh - 1), then
  // saturation to a signed word of w bits.
  function automatic int round_shift_sat(input int v, input int sh, input int w);
    int r, hi, lo;
    r  = (sh > 0) ? ((v + (1 <<< (sh - 1))) >>> sh) : v;
    hi = (1 <<< (w - 1)) - 1;
    lo = -(1 <<< (w - 1));
    if (r > hi) return hi;
    if (r < lo) return lo;
    return r;
  endfunction

endpackage
