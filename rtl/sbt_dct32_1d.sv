// sbt_dct32_1d: multisize 1-D HEVC forward integer transform using signed
// bit-plane (SBT) matrices and 2-SSBT adder reuse.
//
// The HEVC matrix D_N is split into K = 7 matrices B_{N,k} of 0/+1/-1
// elements with D_N = sum_k B_{N,k} 2^k, so y = D_N x needs only additions on
// narrow data: y = sum_k 2^k (B_{N,k} x).  The datapath is folded over the
// planes.  One input vector of 32 samples is registered; during the next K
// clocks the code ROM delivers plane k = K-1 .. 0; sixteen 2-SSBT units form
// x_j + x_{j+1} and x_j - x_{j+1} once per sample pair and each of the 32
// matrix rows selects one of the nine pair combinations; per row a tree of
// join adders (2-SSBT -> 4-SSBT -> ... -> 32-SSBT) gives B_{N,k} x; the
// plane accumulator recombines the planes with weights 2^k by shift-add.
//
// Sizes: in_size selects 4, 8, 16 or 32 points.  For N < 32 the 32 input
// samples are 32/N independent vectors of N samples (vector s in
// in_x[s*N +: N]) and out_y[s*N + r] is coefficient r of vector s, so every
// size delivers 32 coefficients per vector slot.  The size can change from
// one vector to the next.
//
// Timing: valid/ready handshakes on input and output.  A new vector is taken
// every K = 7 clocks at most; out_valid follows K+1 clocks after the input is
// accepted.  If out_ready is low when a result is due, the datapath stalls.
// Results are exact (no rounding or scaling): OW = DW + 12 bits.
//
// The SBT decomposition, 2-SSBT adder reuse, hierarchical M-SSBT joins and
// the 32x32 multisize 1-D organisation follow the SBT architecture.  The
// folding over bit planes, the packing of small sizes, the widths, the
// handshakes and the absence of output scaling are this design's choices.
module sbt_dct32_1d
  import sbt_pkg::*;
#(
  parameter int unsigned DW = 16,        // input sample width
  parameter int unsigned OW = DW + 12    // output coefficient width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input vector
  input  logic                 in_valid,
  output logic                 in_ready,
  input  tsize_e               in_size,
  input  logic signed [DW-1:0] in_x [NMAX],
  // output coefficients
  output logic                 out_valid,
  input  logic                 out_ready,
  output tsize_e               out_size,
  output logic signed [OW-1:0] out_y [NMAX]
);

  localparam int unsigned SW = DW + 2;             // 2-SSBT result width
  localparam int unsigned PW = SW + $clog2(NPAIRS); // plane result width

  // ---------------------------------------------------------------- control
  logic       load, first, acc_en, out_load;
  logic [2:0] plane;

  sbt_ctrl #(.K(K)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .load,
    .plane, .first, .acc_en, .out_load,
    .out_valid, .out_ready, .stall()
  );

  // ---------------------------------------------------------- input register
  logic signed [DW-1:0] x_q [NMAX];
  tsize_e               size_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= '{default: '0};
      size_q <= SZ32;
    end else if (load) begin
      x_q    <= in_x;
      size_q <= in_size;
    end
  end

  // ----------------------------------------------------------- SBT plane ROM
  sbt_plane_t codes;

  sbt_code_rom u_rom (
    .size (size_q),
    .plane(plane),
    .codes(codes)
  );

  // --------------------------------------------------- 2-SSBT units (shared)
  logic signed [SW-1:0] sel [NPAIRS][NMAX];   // [pair][row]

  for (genvar p = 0; p < NPAIRS; p++) begin : g_pair
    sbt_t [NMAX-1:0][1:0] pc;
    for (genvar r = 0; r < NMAX; r++) begin : g_row
      assign pc[r][0] = codes[r][2*p];
      assign pc[r][1] = codes[r][2*p + 1];
    end

    ssbt2 #(.DW(DW), .ROWS(NMAX)) u_ssbt2 (
      .x0(x_q[2*p]),
      .x1(x_q[2*p + 1]),
      .c (pc),
      .y (sel[p])
    );
  end

  // ------------------------------------------------ M-SSBT join tree per row
  logic signed [PW-1:0] prow [NMAX];

  for (genvar r = 0; r < NMAX; r++) begin : g_tree
    logic signed [SW-1:0] leaves [NPAIRS];
    for (genvar p = 0; p < NPAIRS; p++) begin : g_leaf
      assign leaves[p] = sel[p][r];
    end

    mssbt_tree #(.W(SW), .M(NMAX)) u_tree (
      .in(leaves),
      .y (prow[r])
    );
  end

  // ------------------------------------------------ bit-plane recombination
  logic signed [OW-1:0] acc_next [NMAX];

  sbt_plane_acc #(.LANES(NMAX), .IW(PW), .OW(OW)) u_acc (
    .clk, .rst_n,
    .en      (acc_en),
    .first   (first),
    .p       (prow),
    .acc_next(acc_next)
  );

  // --------------------------------------------------------- output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_y    <= '{default: '0};
      out_size <= SZ32;
    end else if (out_load) begin
      out_y    <= acc_next;
      out_size <= size_q;
    end
  end

  // A stalled result must not change.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_size == $past(out_size))
    else $error("sbt_dct32_1d: output changed while stalled");

endmodule
