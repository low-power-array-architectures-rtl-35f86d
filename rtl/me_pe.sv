// me_pe: one processing element of the low-power linear array.
//
// The PE keeps the reference pixel x_ref (x_t) of its column and sees the
// candidate pixels (x_t-1) stream past. The candidate pixel moves through two
// plain registers per PE (x_in -> x_out is two cycles), while the partial row
// sum moves one PE per cycle; this 2:1 speed ratio lines the PEs up so that
// the last PE delivers, in consecutive cycles, the row sums of consecutive
// candidate blocks.
//
// Low-power feature: the candidate pixel and the incoming partial sum are
// captured in two "blocking" registers that load only while dis_in is low.
// While a candidate is blocked they hold their value, so the absolute
// difference unit and the adder behind them do not switch. dis_in is
// forwarded through one register (dis_out), matching the one-cycle-per-PE
// movement of the partial sums. The blocking registers and the dis_out
// register are the extra state of the low-power version; the output ad_out of
// a blocked slot is stale and must be ignored downstream.
//
// Timing: ad_out (combinational) = ad_reg + |x_ref - x_reg|, where ad_reg and
// x_reg hold ad_in and x_in of the previous cycle (if dis_in was low then).
// The register structure follows the processing-element figure; widths,
// the absence of reset on datapath registers and the combinational ad_out are
// this design's choices.
module me_pe #(
  parameter int PIX_W = me_pkg::PIX_W,
  parameter int SUM_W = me_pkg::row_sum_w(me_pkg::DEFAULT_N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PIX_W-1:0] x_ref,    // x_t of this PE's column, current row
  input  logic [PIX_W-1:0] x_in,     // candidate pixel from previous PE
  output logic [PIX_W-1:0] x_out,    // candidate pixel to next PE (2 cycles)
  input  logic [SUM_W-1:0] ad_in,    // partial row sum from previous PE
  output logic [SUM_W-1:0] ad_out,   // partial row sum to next PE
  input  logic             dis_in,   // Disable: hold the blocking registers
  output logic             dis_out   // Disable' to next PE (1 cycle)
);

  logic [PIX_W-1:0] x_d1, x_d2;      // candidate pixel pipeline
  logic [PIX_W-1:0] x_blk;           // blocking register, candidate pixel
  logic [SUM_W-1:0] ad_blk;          // blocking register, partial sum
  logic [PIX_W-1:0] abs_diff;

  always_ff @(posedge clk) begin
    x_d1 <= x_in;
    x_d2 <= x_d1;
    if (!dis_in) begin
      x_blk  <= x_in;
      ad_blk <= ad_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dis_out <= 1'b0;
    else        dis_out <= dis_in;
  end

  always_comb begin
    abs_diff = (x_ref > x_blk) ? (x_ref - x_blk) : (x_blk - x_ref);
    ad_out   = ad_blk + SUM_W'(abs_diff);
  end

  assign x_out = x_d2;

endmodule
