// me_psum_sr: the output shift register holding the accumulated distortions.
//
// It holds D^i(l,c) for the P+1 candidate blocks of the current line l. The
// final adder reads the oldest entry, D^{i-1}(l,c), and in the same cycle the
// new D^i(l,c) is shifted in, so the register advances only on the P+1 cycles
// of each row period in which a valid candidate leaves the array (shift).
// After P further shifts (the other P candidates) the entry is at the tail
// again, exactly when row i+1 of candidate c arrives.
//
// Depth: P+1 entries, one per candidate of a line. The array figure prints a
// length of p+2 for this register; this design reads the sum at the tail of a
// P+1-entry register, the smallest length that works with its timing.
// Datapath entries are not reset; the first row of every line ignores dout.
module me_psum_sr #(
  parameter int P = me_pkg::DEFAULT_P,
  parameter int W = me_pkg::dist_w(me_pkg::DEFAULT_N)
) (
  input  logic         clk,
  input  logic         shift,   // a valid candidate leaves the array
  input  logic [W-1:0] din,     // D^i(l,c)
  output logic [W-1:0] dout     // D^{i-1}(l,c) (tail)
);

  logic [W-1:0] sr [P+1];

  always_ff @(posedge clk) begin
    if (shift) begin
      sr[0] <= din;
      for (int k = 1; k <= P; k++) sr[k] <= sr[k-1];
    end
  end

  assign dout = sr[P];

endmodule
