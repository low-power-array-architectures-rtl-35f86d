// tb_me_psum_sr: random shift enables and data; after every shift the tail
// must be the value written P+1 shifts earlier, and it must not move while
// shift is low.
module tb_me_psum_sr;
  localparam int P = 31;
  localparam int W = 16;
  logic clk = 0, shift = 0;
  logic [W-1:0] din = 0, dout;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  me_psum_sr #(.P(P), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (hist.size() >= P + 1) begin
        checks++;
        if (dout !== hist[hist.size() - (P + 1)]) begin
          failures++; $display("t=%0d got %0d exp %0d", t, dout, hist[hist.size() - (P + 1)]);
        end
      end
      shift = ($urandom_range(0, 2) != 0);
      din   = W'($urandom);
      if (shift) hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
