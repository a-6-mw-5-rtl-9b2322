// tb_sync_fifo: random pushes and pops against a queue reference; checks
// order, full/empty flags and count.
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_sync_fifo;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_data, out_data;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  sync_fifo #(.WIDTH(32), .DEPTH(16)) dut (.*);
  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 9) < (c < 1500 ? 7 : 3));
      out_ready = ($urandom_range(0, 9) < (c < 1500 ? 3 : 7));
      in_data   = $urandom;
      checks++;
      if (count != 5'(q.size()) || in_ready != (q.size() < 16) || out_valid != (q.size() > 0)) begin
        failures++; $display("FAIL flags count=%0d ref=%0d", count, q.size());
      end
      if (out_valid && out_data != q[0]) begin failures++; $display("FAIL data"); end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
