// tb_me_blocking_sr: random bits in, each must come out exactly P cycles
// later; zeros after reset.
module tb_me_blocking_sr;
  localparam int P = 31;
  logic clk = 0, rst_n = 0, blk_in = 0, blk_out;
  logic hist [$];
  int checks = 0, failures = 0;

  me_blocking_sr #(.P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      checks++;
      if (t < P) begin
        if (blk_out !== 1'b0) begin failures++; $display("t=%0d not cleared", t); end
      end else if (blk_out !== hist[t-P]) begin
        failures++; $display("t=%0d got %0b exp %0b", t, blk_out, hist[t-P]);
      end
      blk_in = 1'($urandom);
      hist.push_back(blk_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
