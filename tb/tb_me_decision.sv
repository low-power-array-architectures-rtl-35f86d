// tb_me_decision: final adder, comparator, D_min and motion-vector registers.
// Random row sums, partial sums, blocking flags and row positions are driven;
// the testbench recomputes D^i, the ">= D_min" blocking decision and the
// last-row minimum update (strict "<", vector = index - (P+1)/2) and checks
// them every cycle, including clear and the frozen sum of blocked candidates.
module tb_me_decision;
  localparam int N = 16, P = 31;
  localparam int W = 16, SUM_W = 12, CW = 5, MW = 5;

  logic clk = 0, rst_n = 0;
  logic clear, valid, first_row, last_row, blocked;
  logic [CW-1:0] l_idx, c_idx;
  logic [SUM_W-1:0] row_sum;
  logic [W-1:0] psum_in, psum_out, d_min;
  logic blk_ge, min_upd;
  logic signed [MW-1:0] mv_l, mv_c;
  int checks = 0, failures = 0, n_upd = 0, n_ge = 0, n_eq = 0;
  int m_dmin, m_l, m_c;

  me_decision #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%s", what); end
  endtask

  initial begin
    clear = 0; valid = 0; first_row = 0; last_row = 0; blocked = 0;
    l_idx = 0; c_idx = 0; row_sum = 0; psum_in = 0;
    m_dmin = 65535; m_l = 0; m_c = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10000; t++) begin
      automatic int prev, acc;
      automatic bit ge, upd;
      @(negedge clk);
      chk(int'(d_min) == m_dmin, $sformatf("t=%0d d_min %0d exp %0d", t, d_min, m_dmin));
      chk(int'(mv_l) == m_l && int'(mv_c) == m_c,
          $sformatf("t=%0d mv (%0d,%0d) exp (%0d,%0d)", t, mv_l, mv_c, m_l, m_c));
      clear     = (t % 2500 == 0);
      valid     = ($urandom_range(0, 4) != 0);
      first_row = ($urandom_range(0, 7) == 0);
      last_row  = !first_row && ($urandom_range(0, 2) == 0);
      blocked   = !first_row && ($urandom_range(0, 3) == 0);
      l_idx     = CW'($urandom);
      c_idx     = CW'($urandom);
      row_sum   = SUM_W'($urandom_range(0, 4080));
      // partial sums drift downwards so that the minimum keeps improving
      psum_in   = W'($urandom_range(0, 61200 - (t % 2500) * 24));
      // now and then hit the current minimum exactly (ties and the >= edge)
      if (m_dmin < 60000 && $urandom_range(0, 5) == 0) begin
        if (blocked || first_row || int'(row_sum) > m_dmin) row_sum = '0;
        psum_in = W'(m_dmin - int'(row_sum));
        if (first_row) begin first_row = 0; blocked = 1; psum_in = W'(m_dmin); end
      end
      #1;
      prev = first_row ? 0 : int'(psum_in);
      acc  = blocked ? prev : prev + int'(row_sum);
      ge   = valid && (acc >= m_dmin);
      upd  = valid && last_row && (acc < m_dmin);
      chk(int'(psum_out) == acc, $sformatf("t=%0d psum_out %0d exp %0d", t, psum_out, acc));
      chk(blk_ge == ge, $sformatf("t=%0d blk_ge", t));
      chk(min_upd == upd, $sformatf("t=%0d min_upd", t));
      if (ge) n_ge++;
      if (valid && acc == m_dmin) n_eq++;
      if (clear) begin
        m_dmin = 65535; m_l = 0; m_c = 0;
      end else if (upd) begin
        n_upd++;
        m_dmin = acc; m_l = int'(l_idx) - 16; m_c = int'(c_idx) - 16;
      end
    end
    chk(n_upd > 10 && n_ge > 10 && n_eq > 10,
        $sformatf("updates %0d, blocking decisions %0d, ties %0d", n_upd, n_ge, n_eq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
