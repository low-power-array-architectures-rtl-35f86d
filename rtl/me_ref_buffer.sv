// me_ref_buffer: storage for the N x N reference block x_t and the per-PE
// reference pixel supply.
//
// The block is written one pixel per cycle through (wr_en, wr_row, wr_col,
// wr_px) before a search starts. During the search every PE k reads
// x_t(rd_row, N-1-k): PE 0 gets the last column of the reference row and the
// last PE the first column, as in the array figure, where each PE receives
// one pixel of the current reference row held for n+p cycles.
//
// A single row select serves all PEs: the controller switches rd_row to row i
// N cycles after the first pixel of search-area row i entered the array,
// which falls inside the idle gap of every PE (see me_control). How the
// reference pixels are stored and selected is this design's own choice; the
// document only shows which pixel each PE must see. Read is combinational.
module me_ref_buffer #(
  parameter int N     = me_pkg::DEFAULT_N,
  parameter int PIX_W = me_pkg::PIX_W,
  localparam int RW   = me_pkg::idx_w(N)
) (
  input  logic                    clk,
  input  logic                    wr_en,
  input  logic [RW-1:0]           wr_row,
  input  logic [RW-1:0]           wr_col,
  input  logic [PIX_W-1:0]        wr_px,
  input  logic [RW-1:0]           rd_row,
  output logic [N-1:0][PIX_W-1:0] x_ref    // x_ref[k] = x_t(rd_row, N-1-k)
);

  logic [PIX_W-1:0] mem [N][N];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row][wr_col] <= wr_px;
  end

  always_comb begin
    for (int k = 0; k < N; k++) x_ref[k] = mem[rd_row][N-1-k];
  end

endmodule
