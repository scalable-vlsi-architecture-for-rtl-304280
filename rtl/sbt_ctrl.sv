// sbt_ctrl: plane sequencer and handshake control of the folded SBT datapath.
//
// The datapath is folded over the K signed bit planes: one input vector is
// held for K clocks while the planes K-1 .. 0 pass through the shared 2-SSBT
// and M-SSBT hardware, one per clock.  The controller counts the planes,
// accepts a new vector in the clock of the last plane (so vectors follow
// each other every K clocks with no bubble), and loads the output register
// when the last plane completes.
//
// Handshakes are valid/ready on both sides.  If the output register still
// holds an unaccepted result when the last plane is reached, the datapath
// stalls on that plane (the accumulator does not move) until out_ready.
// Latency: a vector accepted in clock t gives out_valid in clock t+K+1.
// The folding over planes, the handshakes and the stall rule are this
// design's choices; the SBT architecture is only described as partially folded.
module sbt_ctrl #(
  parameter int unsigned K = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic                 load,       // capture the input vector
  output logic [$clog2(K)-1:0] plane,      // plane in the datapath
  output logic                 first,      // plane == K-1
  output logic                 acc_en,     // accumulator advances
  output logic                 out_load,   // capture the final result
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic                 stall       // last plane waits for the output
);

  logic busy;

  assign stall    = busy && (plane == '0) && out_valid && !out_ready;
  assign acc_en   = busy && !stall;
  assign out_load = busy && (plane == '0) && !stall;
  assign first    = (plane == ($clog2(K))'(K - 1));
  assign in_ready = !busy || out_load;
  assign load     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      plane     <= '0;
      out_valid <= 1'b0;
    end else begin
      if (load) begin
        busy  <= 1'b1;
        plane <= ($clog2(K))'(K - 1);
      end else if (out_load) begin
        busy  <= 1'b0;
      end else if (acc_en) begin
        plane <= plane - 1'b1;
      end

      if (out_load)       out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
    end
  end

  // A result that is not taken stays valid.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid)
    else $error("sbt_ctrl: out_valid dropped before out_ready");

endmodule
