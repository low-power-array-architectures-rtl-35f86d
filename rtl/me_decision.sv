// me_decision: final adder, comparator, minimum-distortion and motion-vector
// registers of the low-power array.
//
// In each valid cycle (valid = a candidate block's row sum leaves the array)
// the final adder forms the accumulated distortion
//     acc = D^{i-1}(l,c) + D_i(l,c)
// with D^{i-1} from the output shift register (zero in the first row of a
// line). If the candidate was blocked in this row (blocked, the disable that
// travelled with it) the stale row sum is not added and acc = D^{i-1}: the
// distortion of a blocked candidate stays frozen at a value that is already
// >= D_min. acc goes back to the output shift register (psum_out) and is
// compared with D_min:
//   * blk_ge = (acc >= D_min) goes to the blocking shift register and blocks
//     candidate c in the next row;
//   * in the last row (acc = D(l,c)), acc < D_min loads D_min with acc and the
//     motion-vector register with (l, c) from the scan counter, both shifted by
//     floor(-P/2) to signed vector components.
// clear (one cycle, at the start of a search) sets D_min to all ones, which is
// above any possible distortion.
//
// Because candidates are visited line by line and column by column and the
// update uses a strict "<", ties resolve to the first candidate in scan order.
// Updating D_min as each last-row candidate leaves, instead of once after the
// whole line, gives the same minimum and vector. The adder, comparator, D_min,
// counter and MV blocks follow the array figure; freezing the blocked sum,
// the reset value and the tie rule are this design's reading of the algorithm.
module me_decision #(
  parameter int N  = me_pkg::DEFAULT_N,
  parameter int P  = me_pkg::DEFAULT_P,
  localparam int SUM_W = me_pkg::row_sum_w(N),
  localparam int W     = me_pkg::dist_w(N),
  localparam int CW    = me_pkg::idx_w(P + 1),
  localparam int MW    = me_pkg::mv_w(P)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,      // start of a search
  input  logic                valid,      // a candidate row sum is present
  input  logic                first_row,  // i == 0
  input  logic                last_row,   // i == N-1
  input  logic [CW-1:0]       l_idx,      // candidate line 0..P
  input  logic [CW-1:0]       c_idx,      // candidate column 0..P
  input  logic [SUM_W-1:0]    row_sum,    // D_i(l,c) from the last PE
  input  logic                blocked,    // candidate skipped in this row
  input  logic [W-1:0]        psum_in,    // D^{i-1}(l,c) from output SR
  output logic [W-1:0]        psum_out,   // D^i(l,c) to output SR
  output logic                blk_ge,     // to blocking SR
  output logic                min_upd,    // D_min / MV loaded this cycle
  output logic [W-1:0]        d_min,
  output logic signed [MW-1:0] mv_l,
  output logic signed [MW-1:0] mv_c
);

  localparam int OFFS = (P + 1) / 2;  // -floor(-P/2)

  logic [W-1:0] prev;

  always_comb begin
    prev     = first_row ? '0 : psum_in;
    psum_out = blocked ? prev : prev + W'(row_sum);
    blk_ge   = valid && (psum_out >= d_min);
    min_upd  = valid && last_row && (psum_out < d_min);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_min <= '1;
      mv_l  <= '0;
      mv_c  <= '0;
    end else if (clear) begin
      d_min <= '1;
      mv_l  <= '0;
      mv_c  <= '0;
    end else if (min_upd) begin
      d_min <= psum_out;
      mv_l  <= MW'(int'(l_idx) - OFFS);
      mv_c  <= MW'(int'(c_idx) - OFFS);
    end
  end

endmodule
