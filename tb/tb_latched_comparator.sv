// tb_latched_comparator -- checks the latched comparator: taken when the
// positive current is at least the negative one, weak when the difference
// is below THETA, both held until the next latch enable.
module tb_latched_comparator;
  localparam int IW = 11, THETA = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic latch_en = 0, taken, is_weak;
  logic [IW-1:0] i_pos = 0, i_neg = 0;
  latched_comparator #(.IW(IW), .THETA(THETA)) dut (.*);
  int checks = 0, failures = 0;
  bit et = 0, ew = 1;
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      int d;
      @(negedge clk);
      latch_en = 1'($urandom);
      i_pos = IW'($urandom % 1500);
      i_neg = (it % 4 == 0) ? IW'(int'(i_pos) + int'($urandom % 5) - 2) : IW'($urandom % 1500);
      if (latch_en) begin
        d = int'(i_pos) - int'(i_neg);
        et = (d >= 0); ew = ((d < 0 ? -d : d) < THETA);
      end
      @(negedge clk);
      latch_en = 0;
      checks++;
      if (taken != et || is_weak != ew) begin
        failures++; $display("FAIL %0d %0d: %b %b", i_pos, i_neg, taken, is_weak);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
