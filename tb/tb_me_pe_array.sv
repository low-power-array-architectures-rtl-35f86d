// tb_me_pe_array: the N-PE array with a fixed reference row.
// A random pixel stream enters one pixel per cycle. Candidate c (pixels
// c..c+N-1) must leave as row_sum = sum_j |ref[j] - px[c+j]| exactly 2N-1
// cycles after pixel c entered (registered: 2N cycles, as the architecture
// specifies). Random candidates are disabled by raising dis_in when their
// pixel c+N-1 enters; dis_out must then be high with that candidate, and the
// sums of the candidates that were not disabled must still be exact.
module tb_me_pe_array;
  localparam int N = 16;
  localparam int PIX_W = 8;
  localparam int SUM_W = 12;
  localparam int LEN = 600;

  logic clk = 0, rst_n = 0;
  logic [N-1:0][PIX_W-1:0] x_ref;
  logic [PIX_W-1:0] x_in;
  logic dis_in;
  logic [SUM_W-1:0] row_sum;
  logic dis_out;
  logic [PIX_W-1:0] refrow [N];
  logic [PIX_W-1:0] px [LEN];
  logic dis [LEN];      // dis[c]: candidate c disabled
  int checks = 0, failures = 0, n_dis = 0;

  me_pe_array #(.N(N), .PIX_W(PIX_W), .SUM_W(SUM_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (LEN + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sad(int c);
    int s = 0;
    for (int j = 0; j < N; j++)
      s += (refrow[j] > px[c+j]) ? refrow[j] - px[c+j] : px[c+j] - refrow[j];
    return s;
  endfunction

  initial begin
    for (int j = 0; j < N; j++) refrow[j] = PIX_W'($urandom);
    for (int k = 0; k < N; k++) x_ref[k] = refrow[N-1-k];
    for (int t = 0; t < LEN; t++) begin
      px[t]  = (t < LEN / 2) ? PIX_W'($urandom) : (($urandom_range(0, 1) != 0) ? 8'hff : 8'h00);
      dis[t] = ($urandom_range(0, 3) == 0);
    end
    x_in = 0; dis_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < LEN; t++) begin
      // outputs for candidate c = t - (2N-1)
      automatic int c = t - (2 * N - 1);
      if (c >= 0 && c + N <= LEN) begin
        checks++;
        if (dis_out !== dis[c]) begin failures++; $display("c=%0d dis_out %0b", c, dis_out); end
        if (!dis[c]) begin
          checks++;
          if (int'(row_sum) != sad(c)) begin
            failures++; $display("c=%0d row_sum %0d exp %0d", c, row_sum, sad(c));
          end
        end else n_dis++;
      end
      x_in   = px[t];
      dis_in = (t >= N - 1) ? dis[t - (N - 1)] : 1'b0;
      @(negedge clk);
    end
    if (n_dis == 0) begin failures++; $display("no candidate disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
