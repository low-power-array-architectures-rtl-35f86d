// me_lp_top: low-power linear systolic array for full-search block-matching
// motion estimation.
//
// The array finds, for an N x N reference block, the candidate block of an
// (N+P) x (N+P) search area with the smallest sum of absolute differences
// (SAD) and returns that minimum (d_min) and the motion vector (mv_l, mv_c),
// each in floor(-P/2)..floor(P/2). Defaults N = 16, P = 31: a 47 x 47 search
// area and vectors -16..+15.
//
// Operation: load the reference block through ref_we/ref_row/ref_col/ref_px,
// then pulse start. For (N+P)*N*(P+1) cycles the array reads one search-area
// pixel per cycle: sa_rd is high and sa_row/sa_col give the position whose
// pixel must be on sa_px in the same cycle (search-area row 0 is vector line
// floor(-P/2)). done pulses (N+P)*N*(P+1) + N cycles after the first read
// cycle, when d_min, mv_l and mv_c hold the result; they stay until the next
// start. The reference block must not be written while busy (asserted).
//
// Low-power mechanism: the SAD of a candidate is accumulated one reference
// row at a time. As soon as a candidate's partial SAD reaches the minimum
// already found in earlier candidate lines, its remaining rows are skipped:
// the blocking bit travels with the candidate through the PEs and freezes
// their input registers, so the absolute-difference units and adders do not
// switch. The result is the same as for an exhaustive search. skip pulses
// for each (candidate, row) whose computation was skipped and min_upd for
// each improvement of the minimum; both exist to observe the mechanism.
//
// Structure (as in the array figure): me_ref_buffer feeds the reference
// pixels to the N PEs of me_pe_array; me_decision holds the final adder,
// comparator, D_min and MV; me_psum_sr is the output shift register of
// partial SADs and me_blocking_sr the blocking shift register; me_control
// holds the scan counters. The handshake and the frame-buffer-style read
// port are this design's own.
module me_lp_top #(
  parameter int N     = me_pkg::DEFAULT_N,
  parameter int P     = me_pkg::DEFAULT_P,
  localparam int PIX_W = me_pkg::PIX_W,
  localparam int RW    = me_pkg::idx_w(N),
  localparam int QW    = me_pkg::idx_w(N + P),
  localparam int CW    = me_pkg::idx_w(P + 1),
  localparam int W     = me_pkg::dist_w(N),
  localparam int SUM_W = me_pkg::row_sum_w(N),
  localparam int MW    = me_pkg::mv_w(P)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // reference block load
  input  logic                 ref_we,
  input  logic [RW-1:0]        ref_row,
  input  logic [RW-1:0]        ref_col,
  input  logic [PIX_W-1:0]     ref_px,
  // search control
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // search-area read port
  output logic                 sa_rd,
  output logic [QW-1:0]        sa_row,
  output logic [QW-1:0]        sa_col,
  input  logic [PIX_W-1:0]     sa_px,
  // result
  output logic [W-1:0]         d_min,
  output logic signed [MW-1:0] mv_l,
  output logic signed [MW-1:0] mv_c,
  // activity
  output logic                 skip,
  output logic                 min_upd
);

  logic                    clear, dis_en, valid, first_row, last_row;
  logic [RW-1:0]           pe_row;
  logic [CW-1:0]           l_idx, c_idx;
  logic [N-1:0][PIX_W-1:0] x_ref;
  logic [SUM_W-1:0]        row_sum;
  logic                    blk_out, arr_dis_in, arr_dis_out, blk_ge;
  logic [W-1:0]            psum_tail, psum_new;

  me_control #(.N(N), .P(P)) u_ctrl (
    .clk, .rst_n, .start, .busy, .clear, .done,
    .sa_rd, .sa_row, .sa_col, .ref_row(pe_row), .dis_en,
    .valid, .first_row, .last_row, .l_idx, .c_idx
  );

  me_ref_buffer #(.N(N), .PIX_W(PIX_W)) u_ref (
    .clk, .wr_en(ref_we), .wr_row(ref_row), .wr_col(ref_col), .wr_px(ref_px),
    .rd_row(pe_row), .x_ref
  );

  assign arr_dis_in = blk_out && dis_en;

  me_pe_array #(.N(N), .PIX_W(PIX_W), .SUM_W(SUM_W)) u_array (
    .clk, .rst_n, .x_ref, .x_in(sa_px), .dis_in(arr_dis_in),
    .row_sum, .dis_out(arr_dis_out)
  );

  me_decision #(.N(N), .P(P)) u_dec (
    .clk, .rst_n, .clear, .valid, .first_row, .last_row, .l_idx, .c_idx,
    .row_sum, .blocked(arr_dis_out), .psum_in(psum_tail), .psum_out(psum_new),
    .blk_ge, .min_upd, .d_min, .mv_l, .mv_c
  );

  me_psum_sr #(.P(P), .W(W)) u_psum (
    .clk, .shift(valid), .din(psum_new), .dout(psum_tail)
  );

  me_blocking_sr #(.P(P)) u_blk (
    .clk, .rst_n, .blk_in(blk_ge), .blk_out
  );

  assign skip = valid && arr_dis_out;

  // The first row of a line is never skipped, and the reference block must
  // not change while a search is running.
  a_row0_free: assert property (@(posedge clk) disable iff (!rst_n)
                                valid && first_row |-> !arr_dis_out);
  a_ref_idle:  assert property (@(posedge clk) disable iff (!rst_n) ref_we |-> !busy);

endmodule
