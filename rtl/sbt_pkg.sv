// sbt_pkg: constants, types and elaboration-time functions shared by the
// signed-bit-plane (SBT) HEVC integer transform.
//
// The HEVC N-point forward transform matrix D_N (N = 4, 8, 16, 32) is built
// here from the 31 distinct magnitudes of the 32-point matrix.  Row r of D_N
// equals the first N entries of row r*32/N of D_32, as in the HEVC standard.
// Every matrix element d is then split into signed bit planes:
//   d = sum_k b_k 2^k,  b_k in {0, sgn(d)}
// so that D_N = sum_k B_{N,k} 2^k with B_{N,k} holding only 0, +1 and -1.
// The largest magnitude is 90, so K = 7 planes are needed.
//
// To keep the throughput constant for every size, an N-point transform is
// applied to 32/N independent N-sample vectors side by side: the 32x32 matrix
// used by the datapath is block-diagonal with 32/N copies of D_N.  This
// packing, the element encoding and the table layout are choices of this
// design; the decomposition itself is the SBT algorithm.
package sbt_pkg;

  // Largest transform size and number of signed bit planes.
  localparam int unsigned NMAX   = 32;
  localparam int unsigned K      = 7;
  localparam int unsigned NMODES = 4;
  localparam int unsigned NPAIRS = NMAX / 2;

  // Transform size selector.
  typedef enum logic [1:0] {
    SZ4  = 2'd0,
    SZ8  = 2'd1,
    SZ16 = 2'd2,
    SZ32 = 2'd3
  } tsize_e;

  // One SBT matrix element: 00 = 0, 01 = +1, 11 = -1 (10 is never produced
  // and decodes as 0).
  typedef logic [1:0] sbt_t;
  localparam sbt_t SBT_ZERO = 2'b00;
  localparam sbt_t SBT_POS  = 2'b01;
  localparam sbt_t SBT_NEG  = 2'b11;

  // One bit plane of the 32x32 block-diagonal matrix: [row][column].
  typedef sbt_t [NMAX-1:0][NMAX-1:0] sbt_plane_t;
  // All planes of one size, and all sizes.
  typedef sbt_plane_t [K-1:0]        sbt_mode_t;
  typedef sbt_mode_t  [NMODES-1:0]   sbt_tbl_t;

  // Magnitude of the 32-point HEVC basis at angle m*pi/64, m = 1..31
  // (the first column of rows 1..31 of D_32).
  function automatic int cos_mag(input int m);
    case (m)
      1: return 90;  2: return 90;  3: return 90;  4: return 89;
      5: return 88;  6: return 87;  7: return 85;  8: return 83;
      9: return 82; 10: return 80; 11: return 78; 12: return 75;
     13: return 73; 14: return 70; 15: return 67; 16: return 64;
     17: return 61; 18: return 57; 19: return 54; 20: return 50;
     21: return 46; 22: return 43; 23: return 38; 24: return 36;
     25: return 31; 26: return 25; 27: return 22; 28: return 18;
     29: return 13; 30: return 9;  31: return 4;
      default: return 0;
    endcase
  endfunction

  // Element (k, n) of the 32-point HEVC matrix:
  // 64 for k = 0, otherwise the sampled cosine at angle k*(2n+1)*pi/64.
  function automatic int hevc_coef32(input int k, input int n);
    int m;
    if (k == 0) return 64;
    m = (k * (2 * n + 1)) % 128;
    if (m <= 32)      return  cos_mag(m);
    else if (m < 64)  return -cos_mag(64 - m);
    else if (m < 96)  return -cos_mag(m - 64);
    else              return  cos_mag(128 - m);
  endfunction

  // Transform size in samples for a size selector.
  function automatic int tsize_points(input tsize_e sz);
    return 4 << int'(sz);
  endfunction

  // Element (i, j) of the 32x32 block-diagonal matrix used for size sz.
  function automatic int blockdiag_coef(input tsize_e sz, input int i, input int j);
    int n;
    n = tsize_points(sz);
    if ((i / n) != (j / n)) return 0;
    return hevc_coef32((i % n) * (NMAX / n), j % n);
  endfunction

  // Signed bit-plane element of d in plane k (eq. 2 of the SBT algorithm).
  function automatic sbt_t sbt_elem(input int d, input int k);
    int mag;
    mag = (d < 0) ? -d : d;
    if (((mag >> k) & 1) == 0) return SBT_ZERO;
    return (d < 0) ? SBT_NEG : SBT_POS;
  endfunction

  // Full decomposition for all sizes and planes.
  function automatic sbt_tbl_t build_sbt_table();
    sbt_tbl_t t;
    for (int s = 0; s < NMODES; s++)
      for (int k = 0; k < K; k++)
        for (int i = 0; i < NMAX; i++)
          for (int j = 0; j < NMAX; j++)
            t[s][k][i][j] = sbt_elem(blockdiag_coef(tsize_e'(s), i, j), k);
    return t;
  endfunction

endpackage
