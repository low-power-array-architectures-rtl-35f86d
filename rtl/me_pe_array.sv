// me_pe_array: the linear systolic array of N processing elements.
//
// PE k (k = 0 at the input) holds reference pixel x_t(i, N-1-k) of the
// current reference row i. The candidate pixels of one search-area row enter
// PE 0 in raster order, one per cycle, and the first ADin is tied to zero.
// With the candidate pixel moving two registers per PE and the partial sum
// one register per PE, the row sum
//     D_i(c) = sum_j |x_t(i, j) - x_t-1(row, c + j)|
// of candidate column c appears at row_sum 2N-1 cycles after candidate pixel c
// entered (2N cycles once registered), and the p+1 candidates of a line follow
// in consecutive cycles.
//
// dis_in must be high in the cycle in which pixel c + N - 1 (the last column
// of candidate c, which PE 0 uses) is at the input, to skip candidate c in all
// PEs; the disable then travels with the candidate's partial sum and leaves as
// dis_out together with row_sum, which is stale for a skipped candidate.
// The PE order and the zero first ADin follow the array figure; the exact
// cycle at which the disable enters is this design's timing. The candidate
// pixel output of the last PE has no consumer and is left unused.
module me_pe_array #(
  parameter int N     = me_pkg::DEFAULT_N,
  parameter int PIX_W = me_pkg::PIX_W,
  parameter int SUM_W = me_pkg::row_sum_w(N)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N-1:0][PIX_W-1:0]   x_ref,    // x_ref[k] for PE k
  input  logic [PIX_W-1:0]          x_in,     // candidate pixel stream
  input  logic                      dis_in,   // disable for the candidate
  output logic [SUM_W-1:0]          row_sum,  // D_i from the last PE
  output logic                      dis_out   // disable aligned with row_sum
);

  logic [N:0][PIX_W-1:0] x_link;
  logic [N:0][SUM_W-1:0] ad_link;
  logic [N:0]            dis_link;

  assign x_link[0]   = x_in;
  assign ad_link[0]  = '0;
  assign dis_link[0] = dis_in;

  for (genvar k = 0; k < N; k++) begin : g_pe
    me_pe #(.PIX_W(PIX_W), .SUM_W(SUM_W)) u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .x_ref   (x_ref[k]),
      .x_in    (x_link[k]),
      .x_out   (x_link[k+1]),
      .ad_in   (ad_link[k]),
      .ad_out  (ad_link[k+1]),
      .dis_in  (dis_link[k]),
      .dis_out (dis_link[k+1])
    );
  end

  assign row_sum = ad_link[N];
  assign dis_out = dis_link[N];

endmodule
