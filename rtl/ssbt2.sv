// ssbt2: 2-SSBT unit with adder reuse.
//
// A 2-SSBT is the product of a two-element SBT row segment (b_j, b_{j+1}),
// each element 0, +1 or -1, with the input pair (x_j, x_{j+1}).  Only nine
// results exist: +-x_j +-x_{j+1}, +-x_j, +-x_{j+1} and 0.  The unit forms the
// sum x_j + x_{j+1} and the difference x_j - x_{j+1} once, with two adders,
// and every one of the ROWS consumers (all rows of the matrix, and over time
// all bit planes) only selects and, where needed, negates one of them.  This
// is the adder-reuse idea of the SBT architecture: the pair adders are shared
// instead of being repeated for every row and plane.
//
// Interface: x0 = x_j, x1 = x_{j+1}; c[r][0] and c[r][1] are the SBT elements
// for x_j and x_{j+1} of consumer r; y[r] is the selected combination, two
// bits wider than the inputs so that every case, -(x_j + x_{j+1}) with both
// at the most negative value included, is exact.  Purely combinational.
module ssbt2
  import sbt_pkg::*;
#(
  parameter int unsigned DW   = 16,  // input sample width
  parameter int unsigned ROWS = 32   // consumers sharing the pair adders
) (
  input  logic signed [DW-1:0]  x0,
  input  logic signed [DW-1:0]  x1,
  input  sbt_t [ROWS-1:0][1:0]  c,
  output logic signed [DW+1:0]  y [ROWS]
);

  // Two guard bits: -(x_j + x_{j+1}) reaches +2^DW when both are -2^(DW-1).
  logic signed [DW+1:0] a0, a1, sum, dif;

  // The two shared adders.
  assign a0  = (DW+2)'(x0);
  assign a1  = (DW+2)'(x1);
  assign sum = a0 + a1;
  assign dif = a0 - a1;

  for (genvar r = 0; r < ROWS; r++) begin : g_sel
    always_comb begin
      unique case ({c[r][0], c[r][1]})
        {SBT_POS,  SBT_POS }: y[r] =  sum;
        {SBT_POS,  SBT_NEG }: y[r] =  dif;
        {SBT_NEG,  SBT_POS }: y[r] = -dif;
        {SBT_NEG,  SBT_NEG }: y[r] = -sum;
        {SBT_POS,  SBT_ZERO}: y[r] =  a0;
        {SBT_NEG,  SBT_ZERO}: y[r] = -a0;
        {SBT_ZERO, SBT_POS }: y[r] =  a1;
        {SBT_ZERO, SBT_NEG }: y[r] = -a1;
        default:              y[r] = '0;
      endcase
    end
  end

endmodule
