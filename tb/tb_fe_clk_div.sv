// tb_fe_clk_div: the enable must pulse for exactly one cycle in every 16.
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_fe_clk_div;
  logic clk = 0, rst_n, ce;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0, last = -1, n = 0;
  fe_clk_div dut (.*);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      @(posedge clk); #1;
      if (ce) begin
        n++;
        if (last >= 0) begin
          checks++;
          if (c - last != 16) begin failures++; $display("FAIL period %0d", c - last); end
        end
        last = c;
      end
    end
    checks++; if (n != 25) begin failures++; $display("FAIL count %0d", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
