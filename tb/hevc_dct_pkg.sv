// hevc_dct_pkg: the HEVC inverse core transform, for testbenches.
//
// coef(N, k, n) is entry (k, n) of the N-point HEVC integer DCT matrix
// (N = 4, 8, 16, 32): basis function k sampled at point n. All four matrices
// are rows of the 32-point one, C_N[k][n] = C_32[k * 32 / N][n], and C_32[k][n]
// is a signed cosine value picked by the angle index m = (2n + 1) k mod 128
// from the 33 magnitudes of the standard (64 * sqrt(2) * cos(pi m / 64),
// rounded as the standard rounds it, with 64 for the DC row).
// idct_1d applies the transposed matrix to a vector of N coefficients, then
// rounds, shifts right by `shift` and clips to 16 bits, as one pass of the
// HEVC inverse transform does (shift 7 after the first pass, 12 after the
// second for 8-bit video).
package hevc_dct_pkg;

  localparam int MAG [33] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
                              64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13,  9,  4,
                               0};

  function automatic int coef(int n_pts, int k, int n);
    int m;
    m = ((2 * n + 1) * k * (32 / n_pts)) % 128;
    if (m <= 32)      return  MAG[m];
    else if (m <= 64) return -MAG[64 - m];
    else if (m <= 96) return -MAG[m - 64];
    else              return  MAG[128 - m];
  endfunction

  function automatic int clip16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // out[n] = clip16((sum_k coef(N, k, n) * in[k] + 2^(shift-1)) >> shift)
  function automatic int idct_point(int n_pts, int shift, int n, const ref int vin [32]);
    longint acc;
    acc = 0;
    for (int k = 0; k < n_pts; k++) acc += longint'(coef(n_pts, k, n)) * vin[k];
    acc = (acc + (longint'(1) << (shift - 1))) >>> shift;
    return clip16(acc);
  endfunction

endpackage
