// tb_sbt_ctrl: checks the plane sequencer and its handshakes.
//
// A cycle model of the intended behaviour runs beside the controller and
// every output is compared each clock.  Three phases: free flow (in_valid
// and out_ready always high: a vector must be taken every K clocks and its
// result must become valid K+1 clocks after it was taken), random in_valid
// and out_ready (stalls), and an idle gap.  The testbench counts stalls and
// back-to-back accepts and fails if either never happened.
module tb_sbt_ctrl;
  localparam int unsigned K  = 7;
  localparam int unsigned PB = $clog2(K);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          in_valid = 1'b0, out_ready = 1'b0;
  logic          in_ready, load, first, acc_en, out_load, out_valid, stall;
  logic [PB-1:0] plane;
  int checks = 0, failures = 0;

  sbt_ctrl #(.K(K)) dut (.clk, .rst_n, .in_valid, .in_ready, .load, .plane, .first,
                         .acc_en, .out_load, .out_valid, .out_ready, .stall);

  always #5 clk = ~clk;

  // reference model state
  bit rb = 0, rov = 0;
  int rp = 0;
  int cyc = 0, last_load = -1, n_stall = 0, n_b2b = 0, n_rate = 0, n_lat = 0;
  bit free_flow = 0;
  int load_q [$];

  task automatic cmp(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    bit es, eo, ei, el;
    cyc++;
    es = rb && rp == 0 && rov && !out_ready;
    eo = rb && rp == 0 && !es;
    ei = !rb || eo;
    el = in_valid && ei;
    cmp("stall", 32'(stall), 32'(es));
    cmp("out_load", 32'(out_load), 32'(eo));
    cmp("in_ready", 32'(in_ready), 32'(ei));
    cmp("load", 32'(load), 32'(el));
    cmp("out_valid", 32'(out_valid), 32'(rov));
    cmp("acc_en", 32'(acc_en), 32'(rb && !es));
    if (rb) begin
      cmp("plane", 32'(plane), 32'(rp));
      cmp("first", 32'(first), 32'(rp == K - 1));
    end
    if (es) n_stall++;
    if (el && rb) n_b2b++;
    if (el) begin
      if (free_flow && last_load >= 0) begin
        cmp("load interval", 32'(cyc - last_load), K);
        n_rate++;
      end
      last_load = cyc;
      load_q.push_back(cyc);
    end
    if (eo && load_q.size() > 0) begin
      int t0;
      t0 = load_q.pop_front();
      // out_valid is seen one clock after out_load
      if (free_flow) begin
        cmp("latency", 32'(cyc + 1 - t0), K + 1);
        n_lat++;
      end
    end
    // advance the model
    if (el) begin rb = 1; rp = K - 1; end
    else if (eo) rb = 0;
    else if (rb && !es) rp--;
    if (eo) rov = 1;
    else if (out_ready) rov = 0;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // free flow
    @(negedge clk);
    free_flow = 1; in_valid = 1'b1; out_ready = 1'b1;
    repeat (100) @(negedge clk);
    free_flow = 0;
    // random traffic
    repeat (3000) begin
      @(negedge clk);
      in_valid  = ($urandom_range(3) != 0);
      out_ready = ($urandom_range(2) != 0);
    end
    // slow consumer: results wait, the datapath stalls
    repeat (2000) begin
      @(negedge clk);
      in_valid  = ($urandom_range(3) != 0);
      out_ready = ($urandom_range(7) == 0);
    end
    // drain and idle
    in_valid = 1'b0; out_ready = 1'b1;
    repeat (30) @(negedge clk);
    checks++;
    if (out_valid || load_q.size() != 0) failures++;
    checks += 4;
    if (n_stall == 0) begin failures++; $display("no stall seen"); end
    if (n_b2b == 0)   begin failures++; $display("no back-to-back accept seen"); end
    if (n_rate == 0)  begin failures++; $display("no rate check done"); end
    if (n_lat == 0)   begin failures++; $display("no latency check done"); end
    $display("stalls=%0d back_to_back=%0d rate_checks=%0d latency_checks=%0d",
             n_stall, n_b2b, n_rate, n_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
