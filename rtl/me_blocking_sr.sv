// me_blocking_sr: the blocking shift register of the low-power array.
//
// Each cycle the comparator result "D^i(l,c) >= D_min" enters and comes out
// exactly P cycles later. The output side of the array works on candidate c
// of row i at time T, and the input side needs the disable for candidate c of
// row i+1 at time T + P (one row period, N+P cycles, minus the N cycles the
// array takes), so a plain P-stage delay line delivers each blocking bit just
// in time. Its first stage is the blocking register written by the
// comparator; the P stages are the P extra flip-flops the low-power version
// needs for this purpose. The length P follows the array figure; the bit is
// cleared on reset, which is this design's choice.
module me_blocking_sr #(
  parameter int P = me_pkg::DEFAULT_P
) (
  input  logic clk,
  input  logic rst_n,
  input  logic blk_in,    // comparator: D^i >= D_min
  output logic blk_out    // blk_in delayed by P cycles
);

  logic [P-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else begin
      sr[0] <= blk_in;
      for (int k = 1; k < P; k++) sr[k] <= sr[k-1];
    end
  end

  assign blk_out = sr[P-1];

endmodule
