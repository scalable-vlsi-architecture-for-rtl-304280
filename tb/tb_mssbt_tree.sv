// tb_mssbt_tree: checks the hierarchical M-SSBT join tree.
//
// Instantiates a 32-SSBT (16 leaves) and a 4-SSBT (2 leaves, the smallest
// join) and compares each output with the integer sum of its leaves, for
// random and extreme leaf values.
module tb_mssbt_tree;
  localparam int unsigned W = 18;

  logic signed [W-1:0]   in32 [16];
  logic signed [W+3:0]   y32;
  logic signed [W-1:0]   in4 [2];
  logic signed [W:0]     y4;
  int checks = 0, failures = 0;

  mssbt_tree #(.W(W), .M(32)) dut32 (.in(in32), .y(y32));
  mssbt_tree #(.W(W), .M(4))  dut4  (.in(in4),  .y(y4));

  task automatic check();
    int s32, s4;
    #1;
    s32 = 0;
    foreach (in32[i]) s32 += int'(in32[i]);
    s4 = int'(in4[0]) + int'(in4[1]);
    checks += 2;
    if (int'(y32) != s32) begin
      failures++;
      $display("32-SSBT: got %0d expected %0d", y32, s32);
    end
    if (int'(y4) != s4) begin
      failures++;
      $display("4-SSBT: got %0d expected %0d", y4, s4);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (in32[i]) in32[i] = {1'b1, {(W-1){1'b0}}};
    foreach (in4[i])  in4[i]  = {1'b1, {(W-1){1'b0}}};
    check();
    foreach (in32[i]) in32[i] = {1'b0, {(W-1){1'b1}}};
    foreach (in4[i])  in4[i]  = {1'b0, {(W-1){1'b1}}};
    check();
    repeat (2000) begin
      foreach (in32[i]) in32[i] = W'($urandom);
      foreach (in4[i])  in4[i]  = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
