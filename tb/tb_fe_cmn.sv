// tb_fe_cmn: streams random static vectors with a constant offset per
// dimension and checks each output against an integer model of the
// exponential running mean (exact match), that restart clears the mean,
// and that after 8000 frames the offset is removed (|mean output| small).
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_fe_cmn;
  import asr_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic ce, restart, s_valid, s_ready, o_valid, o_ready;
  static_vec_t s_vec, o_vec;
  int checks = 0, failures = 0;
  fe_cmn dut (.*);
  longint mean [13];
  static_vec_t expq [$];
  always @(posedge clk) if (rst_n && ce && !restart) begin
    if (s_valid && s_ready)
      for (int d = 0; d < 13; d++) begin
        longint diff;
        static_vec_t e;
        diff = (longint'(s_vec[d]) <<< 10) - mean[d];
        mean[d] += diff >>> 10;
        if (d == 0) expq.push_back('0);
        e = expq[$];
        e[d] = feat_t'(diff >>> 10);
        expq[$] = e;
      end
    if (o_valid && o_ready) begin
      static_vec_t e;
      e = expq.pop_front();
      checks++;
      if (o_vec != e) begin failures++; $display("FAIL vector"); end
    end
  end
  longint osum;
  initial begin
    for (int d = 0; d < 13; d++) mean[d] = 0;
    ce = 1; restart = 0; s_valid = 0; o_ready = 1; s_vec = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      s_valid = 1;
      for (int d = 0; d < 13; d++) s_vec[d] = 16'(d * 300 - 1500) + 16'($urandom_range(0, 400)) - 16'sd200;
      o_ready = ($urandom_range(0, 5) != 0);
      while (!s_ready) begin @(negedge clk); o_ready = ($urandom_range(0, 5) != 0); end
    end
    @(negedge clk); s_valid = 0; o_ready = 1;
    @(negedge clk);
    osum = 0;
    for (int d = 0; d < 13; d++) osum += (longint'(o_vec[d]) < 0) ? -longint'(o_vec[d]) : longint'(o_vec[d]);
    checks++;
    if (osum > 13 * 250) begin failures++; $display("FAIL offset not removed %0d", osum); end
    // restart clears the mean: a constant input then appears unchanged
    @(negedge clk); restart = 1;
    @(negedge clk); restart = 0;
    for (int d = 0; d < 13; d++) mean[d] = 0;
    expq.delete();
    s_valid = 1;
    for (int d = 0; d < 13; d++) s_vec[d] = 16'sd1234;
    @(negedge clk); s_valid = 0;
    @(negedge clk);
    checks++;
    if (o_vec[5] != 16'sd1234) begin failures++; $display("FAIL restart %0d", o_vec[5]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
