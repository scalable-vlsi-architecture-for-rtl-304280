// mssbt_tree: hierarchical M-SSBT built from 2-SSBT results.
//
// An M-SSBT, the dot product of an M-element SBT row segment with M input
// samples, is the sum of two M/2-SSBT results; recursing down to 2-SSBTs
// gives a binary tree of join adders over the M/2 2-SSBT outputs of one
// matrix row.  Node 1 of the heap-ordered tree is the M-SSBT result, nodes 2
// and 3 are the two M/2-SSBTs, and so on; leaves M/2 .. M-1 are the 2-SSBT
// inputs.  The tree uses M/2 - 1 adders and widens the result by log2(M/2)
// bits, which makes it exact.
//
// Interface: in[i] is the 2-SSBT result for elements 2i and 2i+1; y is the
// M-SSBT result.  Purely combinational.  M must be a power of two >= 2.
module mssbt_tree #(
  parameter int unsigned W = 18,   // width of one 2-SSBT result
  parameter int unsigned M = 32    // SBT row segment length
) (
  input  logic signed [W-1:0]                  in [M/2],
  output logic signed [W+$clog2(M/2)-1:0]      y
);

  localparam int unsigned NIN = M / 2;
  localparam int unsigned OW  = W + $clog2(NIN);

  // Heap-ordered nodes; node 0 is unused.
  logic signed [OW-1:0] node [2*NIN];

  assign node[0] = '0;
  for (genvar i = 0; i < NIN; i++) begin : g_leaf
    assign node[NIN + i] = OW'(in[i]);
  end
  // Join adders: M-SSBT = M/2-SSBT + M/2-SSBT.
  for (genvar p = 1; p < NIN; p++) begin : g_join
    assign node[p] = node[2*p] + node[2*p + 1];
  end

  assign y = node[1];

  initial begin
    assert (M >= 2 && (M & (M - 1)) == 0)
      else $error("mssbt_tree: M must be a power of two >= 2");
  end

endmodule
