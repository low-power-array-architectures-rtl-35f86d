// tb_me_control: scan controller at a reduced size (N = 4, P = 5).
// Checks, cycle by cycle from the first read cycle t = 0: the raster read
// order (line l, row i, column q -> search-area row l+i, column q) for
// exactly (N+P)*N*(P+1) cycles; ref_row = reference row of the pixel read N
// cycles earlier; dis_en; the output-side candidate sequence, which must
// trail the read of column c of each row by 2N-1 cycles; and done exactly
// (N+P)*N*(P+1) + N cycles after t = 0. A start while busy must be ignored.
module tb_me_control;
  localparam int N = 4, P = 5;
  localparam int QW = 4, IW = 2, CW = 3;
  localparam int CLKB = (N + P) * N * (P + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, clear, done, sa_rd, dis_en, valid, first_row, last_row;
  logic [QW-1:0] sa_row, sa_col;
  logic [IW-1:0] ref_row;
  logic [CW-1:0] l_idx, c_idx;
  int checks = 0, failures = 0;

  me_control #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * CLKB) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%s", what); end
  endtask

  int row_at [CLKB];   // reference row of the pixel read at cycle t
  int n_done, n_valid;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      start = 1;
      #1 chk(clear, "clear missing");
      @(negedge clk);
      start = 0;
      n_done = 0; n_valid = 0;
      for (int t = 0; t < CLKB + N + 3; t++) begin
        automatic int l = t / ((N + P) * N);
        automatic int i = (t / (N + P)) % N;
        automatic int q = t % (N + P);
        automatic int to = t - (2 * N - 1);   // read time of the candidate now leaving
        if (t == 7) start = 1;                 // ignored while busy
        if (t == 8) start = 0;
        #1;
        if (t == 7) chk(!clear, "start accepted while busy");
        if (t < CLKB) begin
          row_at[t] = i;
          chk(sa_rd && int'(sa_row) == l + i && int'(sa_col) == q,
              $sformatf("t=%0d read (%0d,%0d,%0b) exp (%0d,%0d)", t, sa_row, sa_col, sa_rd, l + i, q));
          chk(dis_en == (i != 0 && q >= N - 1), $sformatf("t=%0d dis_en", t));
          if (t >= N) chk(int'(ref_row) == row_at[t-N], $sformatf("t=%0d ref_row %0d", t, ref_row));
        end else begin
          chk(!sa_rd, $sformatf("t=%0d sa_rd after the scan", t));
          if (t < CLKB + N) chk(int'(ref_row) == N - 1, $sformatf("t=%0d ref_row hold", t));
        end
        if (to >= 0 && to < CLKB && (to % (N + P)) <= P) begin
          automatic int ol = to / ((N + P) * N);
          automatic int oi = (to / (N + P)) % N;
          automatic int oc = to % (N + P);
          n_valid++;
          chk(valid && int'(l_idx) == ol && int'(c_idx) == oc && first_row == (oi == 0)
              && last_row == (oi == N - 1),
              $sformatf("t=%0d out (%0b %0d %0d) exp (%0d %0d %0d)", t, valid, l_idx, c_idx, ol, oi, oc));
        end else begin
          chk(!valid, $sformatf("t=%0d unexpected valid", t));
        end
        if (done) begin
          n_done++;
          chk(t == CLKB + N, $sformatf("done at t=%0d exp %0d", t, CLKB + N));
        end
        chk(busy == (t < CLKB + N), $sformatf("t=%0d busy %0b", t, busy));
        @(negedge clk);
      end
      chk(n_done == 1, $sformatf("done pulses %0d", n_done));
      chk(n_valid == (P + 1) * (P + 1) * N, "valid count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
