// tb_fe_deltas: streams random static vectors and checks every 39-element
// output against the difference formulas computed in the testbench
// (exact), that output starts only after the fifth input, and that
// restart empties the history.
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_fe_deltas;
  import asr_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic ce, restart, s_valid, s_ready, o_valid, o_ready;
  static_vec_t s_vec;
  feat_vec_t o_vec;
  int checks = 0, failures = 0;
  fe_deltas dut (.*);
  static_vec_t hist [$];
  int nin = 0, nout = 0;
  always @(posedge clk) if (rst_n && ce && !restart) begin
    if (s_valid && s_ready) begin hist.push_back(s_vec); nin++; end
    if (o_valid && o_ready) begin
      int t;
      t = nout + 2;
      for (int d = 0; d < 13; d++) begin
        int cs, dd, aa;
        cs = hist[t][d];
        dd = (int'(hist[t+1][d]) - int'(hist[t-1][d])) >>> 1;
        aa = (int'(hist[t+2][d]) - 2 * cs + int'(hist[t-2][d])) >>> 2;
        checks++;
        if (o_vec[d] != feat_t'(cs) || o_vec[13+d] != feat_t'(dd) || o_vec[26+d] != feat_t'(aa)) begin
          failures++; $display("FAIL t %0d d %0d", t, d);
        end
      end
      nout++;
    end
  end
  initial begin
    ce = 1; restart = 0; s_valid = 0; o_ready = 1; s_vec = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      s_valid = 1;
      for (int d = 0; d < 13; d++) s_vec[d] = 16'($urandom_range(0, 20000)) - 16'sd10000;
      o_ready = ($urandom_range(0, 3) != 0);
      ce = ($urandom_range(0, 5) != 0);
      while (!(s_ready && ce)) begin @(negedge clk); ce = ($urandom_range(0, 5) != 0); o_ready = ($urandom_range(0, 3) != 0); end
    end
    @(negedge clk); s_valid = 0; o_ready = 1; ce = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (nout != nin - 4) begin failures++; $display("FAIL outputs %0d inputs %0d", nout, nin); end
    // restart: four more inputs give no output
    restart = 1; @(negedge clk); restart = 0;
    hist.delete(); nin = 0; nout = 0;
    for (int t = 0; t < 4; t++) begin
      s_valid = 1;
      for (int d = 0; d < 13; d++) s_vec[d] = 16'(t);
      @(negedge clk);
    end
    s_valid = 0; repeat (3) @(negedge clk);
    checks++;
    if (nout != 0) begin failures++; $display("FAIL output after restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
