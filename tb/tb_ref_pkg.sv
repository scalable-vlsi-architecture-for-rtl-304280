// tb_ref_pkg: reference model for the testbenches of the SBT transform.
//
// Gives the HEVC forward transform matrices from a literal list of the 32
// distinct coefficient magnitudes, with the sign taken from the real cosine
// cos(k(2n+1)pi/64), and the same matrices as 32x32 block-diagonal arrays for
// sizes below 32 (32/N vectors of N samples transformed side by side).
// It is written independently of the design's own coefficient functions.
package tb_ref_pkg;

  localparam int C32 [32] = '{64, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78,
                              75, 73, 70, 67, 64, 61, 57, 54, 50, 46, 43, 38,
                              36, 31, 25, 22, 18, 13,  9,  4};

  // Element (k, n) of the N-point HEVC matrix, N = 4, 8, 16, 32.
  function automatic int ref_dn(input int npts, input int k, input int n);
    int  kk, m;
    real c;
    if (k == 0) return 64;
    kk = k * (32 / npts);
    m  = (kk * (2 * n + 1)) % 128;
    if (m > 64) m = 128 - m;
    if (m > 32) m = 64 - m;
    c = $cos(3.14159265358979 * real'(kk * (2 * n + 1)) / 64.0);
    return (c < 0.0) ? -C32[m] : C32[m];
  endfunction

  // Element (i, j) of the 32x32 block-diagonal matrix for size index s
  // (0: 4, 1: 8, 2: 16, 3: 32 points).
  function automatic int ref_bd(input int s, input int i, input int j);
    int npts;
    npts = 4 << s;
    if (i / npts != j / npts) return 0;
    return ref_dn(npts, i % npts, j % npts);
  endfunction

endpackage
