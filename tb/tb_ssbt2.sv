// tb_ssbt2: checks the 2-SSBT adder-reuse unit.
//
// Nine consumers are given the nine element pairs (+-1/0, +-1/0), so every
// combination is checked on every input pair; then random codes are used.
// Inputs cover the extremes (both -2^15, both 2^15-1) and random values.
// The expected output is b0*x0 + b1*x1 computed in plain integers.
module tb_ssbt2;
  import sbt_pkg::*;

  localparam int unsigned DW   = 16;
  localparam int unsigned ROWS = 9;

  logic signed [DW-1:0] x0, x1;
  sbt_t [ROWS-1:0][1:0] c;
  logic signed [DW+1:0] y [ROWS];
  int checks = 0, failures = 0;

  ssbt2 #(.DW(DW), .ROWS(ROWS)) dut (.x0, .x1, .c, .y);

  function automatic int val(input sbt_t e);
    return (e == SBT_POS) ? 1 : (e == SBT_NEG) ? -1 : 0;
  endfunction

  task automatic check();
    #1;
    for (int r = 0; r < ROWS; r++) begin
      int exp;
      exp = val(c[r][0]) * int'(x0) + val(c[r][1]) * int'(x1);
      checks++;
      if (int'(y[r]) != exp) begin
        failures++;
        if (failures < 10)
          $display("x0=%0d x1=%0d codes %b %b: got %0d expected %0d",
                   x0, x1, c[r][0], c[r][1], y[r], exp);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sbt_t e3 [3] = '{SBT_ZERO, SBT_POS, SBT_NEG};

  initial begin
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) begin
        c[3*a + b][0] = e3[a];
        c[3*a + b][1] = e3[b];
      end
    x0 = -16'sd32768; x1 = -16'sd32768; check();
    x0 =  16'sd32767; x1 =  16'sd32767; check();
    x0 = -16'sd32768; x1 =  16'sd32767; check();
    x0 = 16'sd0;      x1 = 16'sd0;      check();
    repeat (500) begin
      x0 = DW'($urandom); x1 = DW'($urandom); check();
    end
    repeat (500) begin
      for (int r = 0; r < ROWS; r++) begin
        c[r][0] = e3[$urandom_range(2)];
        c[r][1] = e3[$urandom_range(2)];
      end
      x0 = DW'($urandom); x1 = DW'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
