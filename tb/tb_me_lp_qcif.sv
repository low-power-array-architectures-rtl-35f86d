// tb_me_lp_qcif: motion estimation on a synthetic QCIF frame pair at the
// default size (16 x 16 macroblocks, 47 x 47 search area).
//
// The previous frame (176 x 144) is a smoothed random texture; the current
// frame is the previous one moved by a fixed displacement (dy, dx) plus a
// little noise. For a set of interior macroblocks, whose whole search area
// lies inside the frame, the reference block and the search area are cut
// from the two frames and the array is run. The testbench checks the minimum
// SAD and the vector against an exhaustive software search, checks that the
// vector equals the applied displacement, and estimates the energy saved by
// early termination with a simple model: an absolute difference costs two
// units, an addition and a comparison one unit each, and a skipped row saves
// N absolute differences and N additions.
module tb_me_lp_qcif;
  localparam int N = 16, P = 31, S = N + P;
  localparam int FW = 176, FH = 144;
  localparam int CLKB = S * N * (P + 1);
  localparam int NMB = 8;

  logic clk = 0, rst_n = 0;
  logic ref_we = 0, start = 0;
  logic [3:0] ref_row = 0, ref_col = 0;
  logic [7:0] ref_px = 0;
  logic busy, done, sa_rd, skip, min_upd;
  logic [5:0] sa_row, sa_col;
  logic [7:0] sa_px;
  logic [15:0] d_min;
  logic signed [4:0] mv_l, mv_c;

  logic [7:0] prv [FH][FW];
  logic [7:0] cur [FH][FW];
  logic [7:0] sa [S][S];   // search area of the current macroblock
  int sy, sx;              // its origin in the previous frame
  int checks = 0, failures = 0, n_skip = 0;
  // loop bounds held in variables keep the simulator from unrolling loops
  int nn = N, pp = P, ss = S, one = 1;
  longint e_full = 0, e_saved = 0;

  assign sa_px = sa_rd ? sa[sa_row][sa_col] : '0;

  me_lp_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && skip) n_skip++;

  initial begin
    repeat (NMB * (CLKB + N * N + 100) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%s", what); end
  endtask

  initial begin
    int noise [FH][FW];
    int dy, dx;
    // smoothed random texture
    foreach (noise[y, x]) noise[y][x] = $urandom_range(0, 255);
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        automatic int s = 0, k = 0;
        for (int a = -one; a <= one; a++)
          for (int b = -one; b <= one; b++)
            if (y + a >= 0 && y + a < FH && x + b >= 0 && x + b < FW) begin
              s += noise[y+a][x+b]; k++;
            end
        prv[y][x] = 8'(s / k);
      end
    dy = $urandom_range(0, 24) - 12;
    dx = $urandom_range(0, 24) - 12;
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        automatic int v = int'(prv[(y + dy + FH) % FH][(x + dx + FW) % FW])
                          + int'($urandom_range(0, 4)) - 2;
        cur[y][x] = 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
      end
    $display("applied displacement (%0d, %0d)", dy, dx);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int mb = 0; mb < NMB; mb++) begin
      automatic int by = 1 + (mb % 7), bx = 1 + ((mb * 3) % 9);
      automatic int g_min = 32'h7fffffff, g_l = 0, g_c = 0, cyc = 0;
      sy = by * N - (P + 1) / 2;
      sx = bx * N - (P + 1) / 2;
      for (int r = 0; r < ss; r++)
        for (int c = 0; c < ss; c++) sa[r][c] = prv[sy + r][sx + c];
      // exhaustive search in software
      for (int l = 0; l <= pp; l++)
        for (int c = 0; c <= pp; c++) begin
          automatic int s = 0;
          for (int i = 0; i < nn; i++)
            for (int j = 0; j < nn; j++) begin
              automatic int a = cur[by*N + i][bx*N + j], b = prv[sy + l + i][sx + c + j];
              s += (a > b) ? a - b : b - a;
            end
          if (s < g_min) begin g_min = s; g_l = l - (P + 1) / 2; g_c = c - (P + 1) / 2; end
        end
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          @(negedge clk);
          ref_we = 1; ref_row = 4'(r); ref_col = 4'(c); ref_px = cur[by*N + r][bx*N + c];
        end
      @(negedge clk);
      ref_we = 0;
      n_skip = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done && cyc < CLKB + 100) begin @(negedge clk); cyc++; end
      chk(cyc == CLKB + N, $sformatf("MB %0d: %0d cycles", mb, cyc));
      chk(int'(d_min) == g_min, $sformatf("MB %0d: d_min %0d exp %0d", mb, d_min, g_min));
      chk(int'(mv_l) == g_l && int'(mv_c) == g_c,
          $sformatf("MB %0d: mv (%0d,%0d) exp (%0d,%0d)", mb, mv_l, mv_c, g_l, g_c));
      chk(int'(mv_l) == dy && int'(mv_c) == dx,
          $sformatf("MB %0d: mv (%0d,%0d), displacement (%0d,%0d)", mb, mv_l, mv_c, dy, dx));
      // energy units: per row of a candidate N*(2+1); per candidate one comparison
      e_full  += longint'((P + 1) * (P + 1)) * (N * N * 3 + 1);
      e_saved += longint'(n_skip) * N * 3;
      $display("MB (%0d,%0d): mv (%0d,%0d) d_min %0d, rows skipped %0d of %0d", by, bx,
               mv_l, mv_c, d_min, n_skip, (P + 1) * (P + 1) * N);
    end
    $display("estimated energy saved: %0d.%01d %%", e_saved * 100 / e_full,
             (e_saved * 1000 / e_full) % 10);
    chk(e_saved > 0, "nothing was skipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
