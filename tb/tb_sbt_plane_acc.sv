// tb_sbt_plane_acc: checks the bit-plane shift-add recombination.
//
// Feeds K = 7 random plane results per lane, most significant plane first,
// and compares the value after the last plane with sum_k 2^k p_k.  A hold
// cycle with en low is inserted in the middle of some sequences; the result
// must not change because of it.
module tb_sbt_plane_acc;
  localparam int unsigned LANES = 4;
  localparam int unsigned IW    = 22;
  localparam int unsigned OW    = 29;
  localparam int unsigned K     = 7;

  logic                 clk = 1'b0, rst_n = 1'b0, en = 1'b0, first = 1'b0;
  logic signed [IW-1:0] p        [LANES];
  logic signed [OW-1:0] acc_next [LANES];
  int checks = 0, failures = 0;

  sbt_plane_acc #(.LANES(LANES), .IW(IW), .OW(OW)) dut (.clk, .rst_n, .en, .first, .p, .acc_next);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp [LANES];
    foreach (p[i]) p[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 300; v++) begin
      foreach (exp[i]) exp[i] = 0;
      for (int k = K - 1; k >= 0; k--) begin
        if (v % 3 == 1 && k == 3) begin
          // hold: en low, inputs disturbed
          en = 1'b0; first = 1'b0;
          foreach (p[i]) p[i] = IW'($urandom);
          @(negedge clk);
        end
        en    = 1'b1;
        first = (k == K - 1);
        foreach (p[i]) begin
          p[i] = (v == 0) ? {1'b1, {(IW-1){1'b0}}} : IW'($urandom);
          exp[i] += longint'(p[i]) * (longint'(1) << k);
        end
        #1;
        if (k == 0) begin
          foreach (p[i]) begin
            checks++;
            if (longint'(acc_next[i]) != exp[i]) begin
              failures++;
              if (failures < 10) $display("lane %0d: got %0d expected %0d", i, acc_next[i], exp[i]);
            end
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
