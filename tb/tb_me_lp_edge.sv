// tb_me_lp_edge: the end-to-end test of tb_me_lp_top at a corner size,
// N = 3 and P = 1 (the smallest search: a 4 x 4 search area, vectors -1..0).
// The blocking shift register then has a single stage and the output shift
// register two entries. Same checks as tb_me_lp_top.
module tb_me_lp_edge;
  localparam int N = 3, P = 1;
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
