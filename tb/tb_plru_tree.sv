// tb_plru_tree: drives random touches and compares the victim with an
// independent tree-PLRU model; also checks the victim is never the way
// touched last and that touching ways in order makes the first one the
// victim.
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_plru_tree;
  localparam int WAYS = 4096;
  localparam int LV = 12;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic touch_valid;
  logic [LV-1:0] touch_way, victim;
  int checks = 0, failures = 0;
  bit ref_tree [WAYS];
  plru_tree #(.WAYS(WAYS)) dut (.*);
  function automatic int ref_victim();
    int n = 1;
    for (int l = 0; l < LV; l++) n = 2 * n + int'(ref_tree[n]);
    return n - WAYS;
  endfunction
  function automatic void ref_touch(input int w);
    int n = w + WAYS;
    while (n > 1) begin
      ref_tree[n / 2] = (n % 2 == 0);   // came from left child: point right
      n = n / 2;
    end
  endfunction
  initial begin
    touch_valid = 0; touch_way = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      touch_valid = 1; touch_way = LV'($urandom_range(0, WAYS - 1));
      if (i % 3 == 0) touch_way = victim;
      @(posedge clk); ref_touch(int'(touch_way));
      #1;
      checks++;
      if (int'(victim) != ref_victim() || victim == touch_way) begin
        failures++; $display("FAIL victim=%0d ref=%0d", victim, ref_victim());
      end
    end
    // in-order touches on the first 8 ways of a fresh sweep
    for (int w = 0; w < WAYS; w++) begin
      @(negedge clk); touch_valid = 1; touch_way = LV'(w);
      @(posedge clk); ref_touch(w);
    end
    @(negedge clk); touch_valid = 0;
    checks++;
    if (victim != 0) begin failures++; $display("FAIL sweep victim=%0d", victim); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
