// tb_sbt_frame: video-frame workload for the SBT 1-D transform core.
//
// Transforms complete 4:2:0 frames (luma plus two chroma planes) of random
// 9-bit residuals as an HEVC 2-D forward transform built from the one 1-D
// core used twice: a row pass, the HEVC first-stage rounding shift
// (log2 N - 1 for 8-bit video), a column pass and the second-stage shift
// (log2 N + 6).  The transpose between the passes is done by the testbench.
// Each 32x32 region of a plane is coded with a randomly chosen block size
// (4, 8, 16 or 32); a bottom strip that is not 32 rows high uses the
// largest size that divides its height.  N-point lines of equal size are
// packed 32/N to a core vector.
//
// Checks: every final coefficient against a direct 2-D matrix product with
// the same shifts, and that every intermediate fits 16 bits.  The clocks
// the core needs per frame (both passes, input always offered, output
// always taken) are measured, must equal 7 clocks per core vector plus the
// pipeline fill of each pass, and are compared with the real-time budget
// of 150 MHz / 30 frames/s = 5,000,000 clocks.  1920x1080 must fit;
// for 3840x2160 the achievable frame rate is reported.
module tb_sbt_frame;
  import sbt_pkg::*;
  import tb_ref_pkg::*;

  localparam int DW       = 16;
  localparam int OW       = 28;
  localparam int BUDGET   = 150_000_000 / 30;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  tsize_e               in_size = SZ32, out_size;
  logic signed [DW-1:0] in_x [32];
  logic signed [OW-1:0] out_y [32];
  int checks = 0, failures = 0;

  sbt_dct32_1d dut (.clk, .rst_n, .in_valid, .in_ready, .in_size, .in_x,
                    .out_valid, .out_ready, .out_size, .out_y);

  always #5 clk = ~clk;

  typedef struct { int bx; int by; int n; } blk_t;
  typedef struct {
    int                   n;
    int                   cnt;
    int                   blk  [8];
    int                   line [8];
    logic signed [DW-1:0] x    [32];
  } cv_t;

  int   refm [4][32][32];
  blk_t blks [$];
  cv_t  send_q [$];
  cv_t  pend_q [$];
  int   pw, ph;
  int   src [], mid [], dst [];
  longint frame_cycles, frame_vectors;
  int   cyc = 0;

  always @(posedge clk) cyc++;

  function automatic int lg2(input int n);
    return (n == 4) ? 2 : (n == 8) ? 3 : (n == 16) ? 4 : 5;
  endfunction

  function automatic int rshift(input longint v, input int s);
    return int'((v + (longint'(1) << (s - 1))) >>> s);
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%s", msg);
  endtask

  // Split the current plane into transform blocks.
  task automatic tile();
    int strip, sn;
    blks.delete();
    for (int ry = 0; ry + 32 <= ph; ry += 32)
      for (int rx = 0; rx < pw; rx += 32) begin
        int n;
        n = 4 << $urandom_range(3);
        for (int y = 0; y < 32; y += n)
          for (int x = 0; x < 32; x += n) blks.push_back('{rx + x, ry + y, n});
      end
    strip = ph % 32;
    if (strip != 0) begin
      sn = (strip % 16 == 0) ? 16 : (strip % 8 == 0) ? 8 : 4;
      for (int y = ph - strip; y < ph; y += sn)
        for (int x = 0; x < pw; x += sn) blks.push_back('{x, y, sn});
    end
  endtask

  // Build the core vectors of one pass (0: rows of src, 1: columns of mid).
  task automatic build(input int pass);
    cv_t cur;
    cur.n = 0; cur.cnt = 0;
    foreach (blks[b]) begin
      int n;
      n = blks[b].n;
      for (int l = 0; l < n; l++) begin
        if (cur.cnt > 0 && (cur.n != n || cur.cnt == 32 / n)) begin
          send_q.push_back(cur);
          cur.cnt = 0;
        end
        if (cur.cnt == 0) begin
          cur.n = n;
          foreach (cur.x[j]) cur.x[j] = '0;
        end
        cur.blk[cur.cnt]  = b;
        cur.line[cur.cnt] = l;
        for (int j = 0; j < n; j++) begin
          int v;
          if (pass == 0) v = src[(blks[b].by + l) * pw + blks[b].bx + j];
          else           v = mid[(blks[b].by + j) * pw + blks[b].bx + l];
          cur.x[cur.cnt * n + j] = DW'(v);
        end
        cur.cnt++;
      end
    end
    if (cur.cnt > 0) send_q.push_back(cur);
  endtask

  // Stream all core vectors through the core and store the results.
  task automatic run_pass(input int pass);
    int t0, nvec;
    nvec = send_q.size();
    @(negedge clk);
    t0 = cyc;
    while (send_q.size() > 0 || pend_q.size() > 0) begin
      in_valid = (send_q.size() > 0);
      if (in_valid) begin
        in_x    = send_q[0].x;
        in_size = tsize_e'(lg2(send_q[0].n) - 2);
      end
      @(posedge clk);
      if (in_valid && in_ready) pend_q.push_back(send_q.pop_front());
      if (out_valid && out_ready) begin
        cv_t c;
        c = pend_q.pop_front();
        checks++;
        if (out_size != tsize_e'(lg2(c.n) - 2)) fail("size tag mismatch");
        for (int s = 0; s < c.cnt; s++) begin
          blk_t b;
          b = blks[c.blk[s]];
          for (int u = 0; u < c.n; u++) begin
            longint y;
            y = longint'(out_y[s * c.n + u]);
            if (pass == 0) begin
              int t;
              t = rshift(y, lg2(c.n) - 1);
              mid[(b.by + c.line[s]) * pw + b.bx + u] = t;
              checks++;
              if (t < -32768 || t > 32767) fail("intermediate exceeds 16 bits");
            end else begin
              dst[(b.by + u) * pw + b.bx + c.line[s]] = rshift(y, lg2(c.n) + 6);
            end
          end
        end
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    frame_cycles  += longint'(cyc - t0);
    frame_vectors += longint'(nvec);
    checks++;
    // 7 clocks per vector, plus fill: accept at t0, last result 8 clocks
    // after the last accept
    if (cyc - t0 != 7 * nvec + 2)
      fail($sformatf("pass took %0d clocks for %0d vectors, expected %0d",
                     cyc - t0, nvec, 7 * nvec + 2));
  endtask

  // Direct 2-D reference for all blocks of the plane.
  task automatic check_plane();
    foreach (blks[b]) begin
      int n, s, bx, by;
      int t [32][32];
      n = blks[b].n; s = lg2(n) - 2; bx = blks[b].bx; by = blks[b].by;
      for (int r = 0; r < n; r++)
        for (int u = 0; u < n; u++) begin
          longint a;
          a = 0;
          for (int j = 0; j < n; j++) a += longint'(refm[3][u * 32 / n][j]) * src[(by + r) * pw + bx + j];
          t[r][u] = rshift(a, lg2(n) - 1);
        end
      for (int v = 0; v < n; v++)
        for (int u = 0; u < n; u++) begin
          longint a;
          a = 0;
          for (int r = 0; r < n; r++) a += longint'(refm[3][v * 32 / n][r]) * t[r][u];
          checks++;
          if (dst[(by + v) * pw + bx + u] != rshift(a, lg2(n) + 6))
            fail($sformatf("plane %0dx%0d block (%0d,%0d) size %0d coef (%0d,%0d): got %0d expected %0d",
                           pw, ph, bx, by, n, v, u, dst[(by + v) * pw + bx + u], rshift(a, lg2(n) + 6)));
        end
    end
  endtask

  task automatic run_plane(input int w, input int h);
    pw = w; ph = h;
    src = new[w * h];
    mid = new[w * h];
    dst = new[w * h];
    foreach (src[i]) src[i] = $urandom_range(510) - 255;
    tile();
    build(0);
    run_pass(0);
    build(1);
    run_pass(1);
    check_plane();
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fmt_w [2] = '{1920, 3840};
    int fmt_h [2] = '{1080, 2160};
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 32; i++)
        for (int j = 0; j < 32; j++) refm[s][i][j] = ref_bd(s, i, j);
    foreach (in_x[j]) in_x[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      frame_cycles = 0; frame_vectors = 0;
      run_plane(fmt_w[f], fmt_h[f]);
      run_plane(fmt_w[f] / 2, fmt_h[f] / 2);
      run_plane(fmt_w[f] / 2, fmt_h[f] / 2);
      $display("%0dx%0d 4:2:0: %0d core vectors, %0d clocks per frame, %0.1f frames/s at 150 MHz (budget %0d clocks for 30 frames/s)",
               fmt_w[f], fmt_h[f], frame_vectors, frame_cycles,
               150.0e6 / real'(frame_cycles), BUDGET);
      checks++;
      if (frame_vectors != longint'(fmt_w[f]) * fmt_h[f] * 3 / 2 * 2 / 32)
        fail("core vector count differs from samples/32 per pass");
      if (f == 0) begin
        checks++;
        if (frame_cycles > BUDGET) fail("1080p frame does not fit the real-time budget");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
