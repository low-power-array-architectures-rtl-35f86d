// me_tb_body.svh: body shared by the end-to-end testbenches of me_lp_top.
// The including module defines N, P and NRUN before the include and
// instantiates me_lp_top as "dut" after it, with (.*) connections, so that
// the full-size test can leave the top's parameters untouched. The including
// module also holds the watchdog.
  localparam int S     = N + P;
  localparam int CLKB  = (N + P) * N * (P + 1);
  localparam int PIX_W = 8;
  localparam int RW    = (N <= 2) ? 1 : $clog2(N);
  localparam int QW    = $clog2(N + P);
  localparam int W     = $clog2(N * N * 255 + 2);
  localparam int MW    = $clog2(P + 1);
  localparam int OFFS  = (P + 1) / 2;

  logic clk = 0, rst_n = 0;
  logic ref_we = 0, start = 0;
  logic [RW-1:0] ref_row = 0, ref_col = 0;
  logic [PIX_W-1:0] ref_px = 0;
  logic busy, done, sa_rd, skip, min_upd;
  logic [QW-1:0] sa_row, sa_col;
  logic [PIX_W-1:0] sa_px;
  logic [W-1:0] d_min;
  logic signed [MW-1:0] mv_l, mv_c;

  int checks = 0, failures = 0;
  int nn = N, pp = P;   // loop bounds in variables: keeps loops from unrolling
  int ev_skip = 0, ev_upd = 0, ev_skip_last = 0, ev_tie = 0;
  int hw_skip, hw_cycles;
  longint tot_slots = 0, tot_skipped = 0;

  logic [PIX_W-1:0] sa  [S][S];
  logic [PIX_W-1:0] rb  [N][N];

  assign sa_px = sa_rd ? sa[sa_row][sa_col] : '0;


  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%s", what); end
  endtask

  // hardware event counters
  always @(posedge clk) begin
    if (rst_n && skip) begin
      hw_skip++;
      if (dut.u_ctrl.last_row) ev_skip_last++;
    end
    if (rst_n && min_upd) ev_upd++;
  end

  function automatic int clip(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // picture generators
  task automatic make_picture(input int kind, output int n_ties);
    int l0, c0, l1, c1, fx, fy;
    n_ties = 0;
    l0 = $urandom_range(0, P); c0 = $urandom_range(0, P);
    case (kind)
      0: begin  // random
        foreach (sa[r, c]) sa[r][c] = PIX_W'($urandom);
        foreach (rb[r, c]) rb[r][c] = PIX_W'($urandom);
      end
      1, 4: begin  // planted copy (two copies for kind 4)
        foreach (sa[r, c]) sa[r][c] = PIX_W'($urandom);
        foreach (rb[r, c]) rb[r][c] = sa[l0 + r][c0 + c];
        if (kind == 4) begin
          do begin l1 = $urandom_range(0, P); c1 = $urandom_range(0, P); end
          while (l1 == l0 && c1 == c0);
          for (int r = 0; r < N; r++)
            for (int c = 0; c < N; c++) sa[l1 + r][c1 + c] = rb[r][c];
          // the copy written last may have overwritten part of the first
          foreach (rb[r, c]) rb[r][c] = sa[l1 + r][c1 + c];
        end
      end
      2: begin  // smooth picture with noise, reference moved by (l0,c0)
        fx = $urandom_range(3, 9); fy = $urandom_range(3, 9);
        foreach (sa[r, c]) sa[r][c] = PIX_W'(clip(128 + (r * fy + c * fx) % 90
                                                   + int'($urandom_range(0, 6)) - 3));
        foreach (rb[r, c]) rb[r][c] = PIX_W'(clip(int'(sa[l0 + r][c0 + c])
                                                   + int'($urandom_range(0, 4)) - 2));
      end
      default: begin  // flat
        fx = $urandom_range(0, 255);
        foreach (sa[r, c]) sa[r][c] = PIX_W'(fx);
        foreach (rb[r, c]) rb[r][c] = PIX_W'(fx);
      end
    endcase
  endtask

  task automatic golden(output int g_min, output int g_l, output int g_c,
                        output int g_skip, output int g_ties);
    int dsum [P+1][P+1][N];   // D^i(l,c)
    int dmin_t;
    g_min = 32'h7fffffff; g_l = 0; g_c = 0; g_skip = 0; g_ties = 0;
    for (int l = 0; l <= pp; l++)
      for (int c = 0; c <= pp; c++)
        for (int i = 0; i < nn; i++) begin
          int s = (i == 0) ? 0 : dsum[l][c][i-1];
          for (int j = 0; j < nn; j++) begin
            int a = rb[i][j], b = sa[l + i][c + j];
            s += (a > b) ? a - b : b - a;
          end
          dsum[l][c][i] = s;
        end
    dmin_t = 32'h7fffffff;
    for (int l = 0; l <= pp; l++) begin
      for (int c = 0; c <= pp; c++) begin
        for (int i = 1; i < nn; i++) if (dsum[l][c][i-1] >= dmin_t) g_skip++;
        if (dsum[l][c][N-1] < g_min) begin
          g_min = dsum[l][c][N-1]; g_l = l - OFFS; g_c = c - OFFS;
        end else if (dsum[l][c][N-1] == g_min) g_ties++;
      end
      dmin_t = g_min;
    end
  endtask

  initial begin
    int g_min, g_l, g_c, g_skip, g_ties, dummy, t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < NRUN; run++) begin
      automatic int kind = run % 5;
      make_picture(kind, dummy);
      golden(g_min, g_l, g_c, g_skip, g_ties);
      // load the reference block
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          @(negedge clk);
          ref_we = 1; ref_row = RW'(r); ref_col = RW'(c); ref_px = rb[r][c];
        end
      @(negedge clk);
      ref_we = 0;
      hw_skip = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      chk(busy && sa_rd, "search did not start");
      hw_cycles = 0;
      while (!done && hw_cycles < CLKB + 4 * N) begin
        @(negedge clk);
        hw_cycles++;
      end
      chk(hw_cycles == CLKB + N, $sformatf("run %0d: done after %0d cycles, exp %0d",
                                           run, hw_cycles, CLKB + N));
      chk(int'(d_min) == g_min, $sformatf("run %0d kind %0d: d_min %0d exp %0d",
                                          run, kind, d_min, g_min));
      chk(int'(mv_l) == g_l && int'(mv_c) == g_c,
          $sformatf("run %0d kind %0d: mv (%0d,%0d) exp (%0d,%0d)", run, kind, mv_l, mv_c, g_l, g_c));
      chk(hw_skip == g_skip, $sformatf("run %0d kind %0d: skipped rows %0d exp %0d",
                                       run, kind, hw_skip, g_skip));
      if (g_ties > 0) ev_tie++;
      ev_skip += hw_skip;
      tot_slots   += longint'((P + 1) * (P + 1) * N);
      tot_skipped += longint'(hw_skip);
      @(negedge clk);
      chk(!busy && !done, "busy/done after the search");
      chk(int'(d_min) == g_min, "result not held");
    end
    $display("skipped rows %0d, minimum updates %0d, last-row skips %0d, searches with ties %0d",
             ev_skip, ev_upd, ev_skip_last, ev_tie);
    $display("row computations skipped: %0d of %0d (%0d.%01d %%)", tot_skipped, tot_slots,
             tot_skipped * 100 / tot_slots, (tot_skipped * 1000 / tot_slots) % 10);
    chk(ev_skip > 0, "no row was ever skipped");
    chk(ev_upd > 0, "the minimum was never updated");
    chk(ev_skip_last > 0, "no candidate was skipped in its last row");
    chk(ev_tie > 0, "no tie occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
