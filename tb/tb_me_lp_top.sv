// tb_me_lp_top: end-to-end test of the low-power motion estimator at a
// reduced size (N = 4, P = 5: 9 x 9 search area, vectors -3..+2).
//
// Each search loads a reference block, starts the array and serves the
// search-area read port from a testbench memory. A golden model computes all
// partial SADs D^i(l,c), the minimum and vector (first minimum in scan
// order), and the number of (candidate, row) pairs the early-termination
// rule must skip: row i >= 1 of candidate (l,c) is skipped when
// D^{i-1}(l,c) >= min{ D(l',c') : l' < l }. The testbench checks d_min,
// the vector, the skip count and the cycle count (done (N+P)*N*(P+1) + N
// cycles after the first read), over several kinds of picture:
// random, an exact copy of the reference planted in noise, a smooth picture
// with noise, a flat picture (all candidates tie) and two planted copies
// (tie between two vectors). It counts how often each mechanism occurred:
// skipped rows, minimum updates, candidates skipped in their last row, ties
// resolved, and fails if one never happened.
module tb_me_lp_top;
  localparam int N = 4, P = 5;
  localparam int NRUN = 40;
`include "tb/me_tb_body.svh"
  me_lp_top #(.N(N), .P(P)) dut (.*);

  // watchdog
  initial begin
    repeat (NRUN * (CLKB + N * N + 4 * N + 20) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
