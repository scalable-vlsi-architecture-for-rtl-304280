// sbt_plane_acc: bit-plane recombination, D_N x = sum_k 2^k (B_{N,k} x).
//
// The planes of one input vector arrive most significant first, one per
// clock.  For every lane the accumulator doubles its value and adds the new
// plane result (Horner's rule), so after the last plane (k = 0) it holds
// sum_k 2^k p_k without any multiplier.  'first' marks plane K-1 and starts
// a fresh sum instead of doubling the old one.
//
// Interface: p[r] is the plane result of lane r; with en high the register
// takes acc_next; acc_next is the value after the current plane, available
// combinationally so the final result can be captured in the same clock as
// the last plane.  Asynchronous active-low reset clears the register.
// Choosing MSB-first order and Horner's rule is this design's choice; the
// weighting itself is eq. (3) of the SBT algorithm.
module sbt_plane_acc #(
  parameter int unsigned LANES = 32,
  parameter int unsigned IW    = 22,   // plane result width
  parameter int unsigned OW    = 28    // accumulator width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 first,
  input  logic signed [IW-1:0] p        [LANES],
  output logic signed [OW-1:0] acc_next [LANES]
);

  logic signed [OW-1:0] acc_q [LANES];

  for (genvar r = 0; r < LANES; r++) begin : g_lane
    always_comb begin
      if (first) acc_next[r] = OW'(p[r]);
      else       acc_next[r] = (acc_q[r] <<< 1) + OW'(p[r]);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  acc_q[r] <= '0;
      else if (en) acc_q[r] <= acc_next[r];
    end
  end

endmodule
