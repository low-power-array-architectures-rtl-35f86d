// tb_me_ref_buffer: writes a random N x N reference block and checks that,
// for every row select, PE k receives pixel (row, N-1-k).
module tb_me_ref_buffer;
  localparam int N = 16;
  localparam int PIX_W = 8;
  localparam int RW = 4;

  logic clk = 0;
  logic wr_en;
  logic [RW-1:0] wr_row, wr_col, rd_row;
  logic [PIX_W-1:0] wr_px;
  logic [N-1:0][PIX_W-1:0] x_ref;
  logic [PIX_W-1:0] blk [N][N];
  int checks = 0, failures = 0;

  me_ref_buffer #(.N(N), .PIX_W(PIX_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_row = 0; wr_col = 0; wr_px = 0; rd_row = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        blk[r][c] = PIX_W'($urandom);
        @(negedge clk);
        wr_en = 1; wr_row = RW'(r); wr_col = RW'(c); wr_px = blk[r][c];
      end
    @(negedge clk);
    wr_en = 0;
    for (int pass = 0; pass < 2; pass++)
      for (int r0 = 0; r0 < N; r0++) begin
        automatic int r = pass ? N - 1 - r0 : r0;
        rd_row = RW'(r);
        @(negedge clk);
        for (int k = 0; k < N; k++) begin
          checks++;
          if (x_ref[k] !== blk[r][N-1-k]) begin
            failures++;
            $display("row %0d PE %0d got %0d exp %0d", r, k, x_ref[k], blk[r][N-1-k]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
