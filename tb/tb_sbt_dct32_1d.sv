// tb_sbt_dct32_1d: end-to-end test of the multisize SBT 1-D transform at its
// default parameters (16-bit samples, 28-bit coefficients).
//
// Vectors of all four sizes are sent in three phases: free flow (in_valid and
// out_ready always high), random valid/ready traffic, and directed extreme
// inputs (all samples at -2^15, all at 2^15-1, alternating signs).  Every
// result is compared with a reference computed by direct multiplication with
// the HEVC matrices (32/N independent N-point vectors for N < 32).  In free
// flow the accept interval must be 7 clocks and the latency from accept to
// out_valid 8 clocks.  The testbench counts size switches between
// consecutive vectors, datapath stalls on a full output register,
// back-to-back accepts and vectors of each size; it fails if any of these
// never happened.
module tb_sbt_dct32_1d;
  import sbt_pkg::*;
  import tb_ref_pkg::*;

  localparam int DW = 16;
  localparam int OW = 28;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  tsize_e               in_size = SZ32, out_size;
  logic signed [DW-1:0] in_x [32];
  logic signed [OW-1:0] out_y [32];
  int checks = 0, failures = 0;

  sbt_dct32_1d dut (.clk, .rst_n, .in_valid, .in_ready, .in_size, .in_x,
                    .out_valid, .out_ready, .out_size, .out_y);

  always #5 clk = ~clk;

  typedef struct {
    int     size;
    longint y [32];
    int     t_in;
  } exp_t;

  int   refm [4][32][32];
  exp_t q [$];
  int   cyc = 0, n_sent = 0, n_recv = 0, last_acc = -1, prev_size = -1;
  int   n_switch = 0, n_stall = 0, n_b2b = 0, n_rate = 0, n_lat = 0;
  int   n_size [4] = '{0, 0, 0, 0};
  bit   free_flow = 0;
  int   pattern = 0;   // 0 random, 1 all min, 2 all max, 3 alternating, 4 small

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("cycle %0d: %s", cyc, msg);
  endtask

  // new stimulus for the next vector
  task automatic new_vector();
    in_size = tsize_e'($urandom_range(3));
    foreach (in_x[j]) begin
      case (pattern)
        1:       in_x[j] = -16'sd32768;
        2:       in_x[j] =  16'sd32767;
        3:       in_x[j] = j[0] ? -16'sd32768 : 16'sd32767;
        4:       in_x[j] = DW'($signed(9'($urandom)));
        default: in_x[j] = DW'($urandom);
      endcase
    end
  endtask

  // accept / compare at the clock edge
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_ctrl.stall) n_stall++;
    if (in_valid && in_ready) begin
      exp_t e;
      e.size = int'(in_size);
      e.t_in = cyc;
      for (int i = 0; i < 32; i++) begin
        e.y[i] = 0;
        for (int j = 0; j < 32; j++) e.y[i] += longint'(refm[e.size][i][j]) * longint'(in_x[j]);
      end
      q.push_back(e);
      n_sent++;
      n_size[e.size]++;
      if (prev_size >= 0 && prev_size != e.size) n_switch++;
      prev_size = e.size;
      if (dut.u_ctrl.busy) n_b2b++;
      if (free_flow && last_acc >= 0) begin
        checks++; n_rate++;
        if (cyc - last_acc != 7) fail($sformatf("accept interval %0d, expected 7", cyc - last_acc));
      end
      last_acc = cyc;
    end
    if (out_valid && out_ready) begin
      if (q.size() == 0) fail("result without input");
      else begin
        exp_t e;
        e = q.pop_front();
        n_recv++;
        checks++;
        if (int'(out_size) != e.size) fail("size tag mismatch");
        for (int i = 0; i < 32; i++) begin
          checks++;
          if (longint'(out_y[i]) != e.y[i])
            fail($sformatf("vector %0d size %0d coef %0d: got %0d expected %0d",
                           n_recv, 4 << e.size, i, out_y[i], e.y[i]));
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 32; i++)
        for (int j = 0; j < 32; j++) refm[s][i][j] = ref_bd(s, i, j);
    foreach (in_x[j]) in_x[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // --- single vector, latency check
    @(negedge clk);
    new_vector();
    in_valid = 1'b1; out_ready = 1'b1;
    begin
      int t0;
      @(posedge clk);
      t0 = cyc;
      @(negedge clk);
      in_valid = 1'b0;
      while (!out_valid) @(negedge clk);
      checks++; n_lat++;
      if (cyc - t0 != 8) fail($sformatf("latency %0d, expected 8", cyc - t0));
    end
    repeat (3) @(negedge clk);

    // --- free flow
    last_acc  = -1;
    free_flow = 1;
    in_valid  = 1'b1;
    new_vector();
    repeat (300) begin
      @(negedge clk);
      if (q.size() > 0 && q[$].t_in == cyc) new_vector();
    end
    in_valid  = 1'b0;
    repeat (20) @(negedge clk);
    free_flow = 0;

    // --- random traffic and directed extremes
    for (int ph = 0; ph < 6; ph++) begin
      pattern = (ph == 0) ? 0 : (ph == 5) ? 4 : ph;
      new_vector();
      repeat (ph == 0 ? 4000 : 400) begin
        @(negedge clk);
        if (in_valid && q.size() > 0 && q[$].t_in == cyc) new_vector();
        if (!in_valid || q.size() == 0 || q[$].t_in != cyc)
          in_valid = ($urandom_range(3) != 0) || in_valid;
        out_ready = ph[0] ? ($urandom_range(2) != 0) : ($urandom_range(7) == 0);
      end
    end

    // --- drain
    in_valid  = 1'b0;
    out_ready = 1'b1;
    repeat (40) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_recv != n_sent) fail("results missing after drain");

    checks += 7;
    if (n_switch == 0) fail("no size switch happened");
    if (n_stall == 0)  fail("no stall happened");
    if (n_b2b == 0)    fail("no back-to-back accept happened");
    if (n_rate == 0)   fail("no rate check done");
    for (int s = 0; s < 3; s++) if (n_size[s] == 0) fail("a size was never used");
    $display("vectors=%0d size4=%0d size8=%0d size16=%0d size32=%0d switches=%0d stalls=%0d back_to_back=%0d",
             n_sent, n_size[0], n_size[1], n_size[2], n_size[3], n_switch, n_stall, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
