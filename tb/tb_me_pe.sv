// tb_me_pe: self-checking testbench for one processing element.
// Random candidate pixels, reference pixels, partial sums and disables are
// driven; a reference model kept in the testbench (two-cycle pixel delay,
// one-cycle disable delay, blocking registers that load only when the
// disable is low) predicts x_out, dis_out and ad_out every cycle.
module tb_me_pe;
  localparam int PIX_W = 8;
  localparam int SUM_W = 12;

  logic clk = 0, rst_n = 0;
  logic [PIX_W-1:0] x_ref, x_in, x_out;
  logic [SUM_W-1:0] ad_in, ad_out;
  logic dis_in, dis_out;
  int checks = 0, failures = 0;

  me_pe #(.PIX_W(PIX_W), .SUM_W(SUM_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  logic [PIX_W-1:0] m_x1, m_x2, m_xb;
  logic [SUM_W-1:0] m_ab;
  logic m_dis;
  int   n_hold = 0;

  function automatic int absd(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    x_ref = 0; x_in = 0; ad_in = 0; dis_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // prime the model with three cycles without disable
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      if (t >= 3) begin
        checks++;
        if (x_out !== m_x2) begin failures++; $display("t=%0d x_out %0d exp %0d", t, x_out, m_x2); end
        checks++;
        if (dis_out !== m_dis) begin failures++; $display("t=%0d dis_out", t); end
        checks++;
        if (int'(ad_out) != int'(m_ab) + absd(x_ref, m_xb)) begin
          failures++; $display("t=%0d ad_out %0d exp %0d", t, ad_out, int'(m_ab) + absd(x_ref, m_xb));
        end
      end
      x_ref  = PIX_W'($urandom);
      x_in   = PIX_W'($urandom);
      ad_in  = SUM_W'($urandom_range(0, 3825));
      dis_in = (t >= 3) && ($urandom_range(0, 3) == 0);
      if (dis_in) n_hold++;
      // model update at the coming posedge
      @(posedge clk);
      m_x2 = m_x1; m_x1 = x_in; m_dis = dis_in;
      if (!dis_in) begin m_xb = x_in; m_ab = ad_in; end
    end
    if (n_hold == 0) begin failures++; $display("no disable applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
