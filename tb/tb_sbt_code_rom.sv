// tb_sbt_code_rom: checks the signed bit-plane ROM.
//
// For every size and every plane it reads B_{N,k} and checks, per matrix
// element, that each plane element is 0 or the sign of the coefficient and
// that sum_k 2^k B_{N,k} equals the reference HEVC coefficient.  It also
// compares the 4-point and two 8-point rows with literal HEVC values and
// checks that an out-of-range plane reads as zero.
module tb_sbt_code_rom;
  import sbt_pkg::*;
  import tb_ref_pkg::*;

  tsize_e     size;
  logic [2:0] plane;
  sbt_plane_t codes;
  int checks = 0, failures = 0;

  sbt_code_rom dut (.size, .plane, .codes);

  int recon [4][32][32];
  bit sign_ok [4][32][32];

  localparam int D4 [4][4] = '{'{64, 64, 64, 64}, '{83, 36, -36, -83},
                               '{64, -64, -64, 64}, '{36, -83, 83, -36}};
  localparam int D8R1 [8] = '{89, 75, 50, 18, -18, -50, -75, -89};
  localparam int D8R3 [8] = '{75, -18, -89, -50, 50, 89, 18, -75};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 32; i++)
        for (int j = 0; j < 32; j++) begin
          recon[s][i][j]   = 0;
          sign_ok[s][i][j] = 1'b1;
        end
    for (int s = 0; s < 4; s++) begin
      for (int k = 0; k < 7; k++) begin
        size  = tsize_e'(s);
        plane = 3'(k);
        #1;
        for (int i = 0; i < 32; i++)
          for (int j = 0; j < 32; j++) begin
            int e, d;
            d = ref_bd(s, i, j);
            case (codes[i][j])
              2'b01:   e = 1;
              2'b11:   e = -1;
              default: e = 0;
            endcase
            if ((e > 0 && d < 0) || (e < 0 && d > 0) || codes[i][j] == 2'b10)
              sign_ok[s][i][j] = 1'b0;
            recon[s][i][j] += e * (1 << k);
          end
      end
    end
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 32; i++)
        for (int j = 0; j < 32; j++) begin
          checks++;
          if (recon[s][i][j] != ref_bd(s, i, j) || !sign_ok[s][i][j]) begin
            failures++;
            if (failures < 10)
              $display("size %0d (%0d,%0d): rebuilt %0d expected %0d", 4 << s, i, j,
                       recon[s][i][j], ref_bd(s, i, j));
          end
        end
    // Literal HEVC values, including the second and third 4-point blocks.
    for (int b = 0; b < 8; b++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (recon[0][4*b + i][4*b + j] != D4[i][j]) failures++;
        end
    for (int j = 0; j < 8; j++) begin
      checks += 2;
      if (recon[1][1][j] != D8R1[j]) failures++;
      if (recon[1][8 + 3][8 + j] != D8R3[j]) failures++;
    end
    plane = 3'd7;
    size  = SZ32;
    #1;
    checks++;
    if (codes != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
