// sbt_code_rom: signed bit-plane (SBT) matrix store.
//
// Returns B_{N,k}, the k-th signed bit plane of the transform matrix for the
// selected size, as a 32x32 array of 0/+1/-1 elements (see sbt_pkg for the
// encoding).  For sizes below 32 the plane is block-diagonal: 32/N copies of
// the N-point plane, so that 32/N short vectors are transformed at once.
//
// The table is computed at elaboration from the HEVC coefficients by the
// package function build_sbt_table(), so it is a constant ROM: synthesis
// turns it into a small decoder of (size, plane).  Purely combinational; an
// out-of-range plane number reads as an all-zero plane.
//
// The bit-plane decomposition D_N = sum_k B_{N,k} 2^k follows the SBT
// algorithm; the block-diagonal packing of small sizes is this design's choice.
module sbt_code_rom
  import sbt_pkg::*;
(
  input  tsize_e     size,   // transform size
  input  logic [2:0] plane,  // bit plane k, 0..K-1
  output sbt_plane_t codes   // codes[row][column]
);

  localparam sbt_tbl_t TABLE = build_sbt_table();

  always_comb begin
    if (int'(plane) < K) codes = TABLE[size][plane];
    else                 codes = '0;
  end

endmodule
