// tb_fe_log: streams random 64-bit energies of random magnitude through the
// log unit with random output stalls and compares each result with
// 256 * ln(x) (tolerance 5 LSB, the 6-bit mantissa ROM), checks o_last
// forwarding and the one-value-per-cycle rate with no stalls.
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_fe_log;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic ce, s_valid, s_ready, s_last, o_valid, o_ready, o_last;
  logic [63:0] s_data;
  logic signed [15:0] o_data;
  int checks = 0, failures = 0;
  fe_log dut (.*);
  logic [63:0] q [$];
  bit lq [$];
  int nout = 0;
  always @(posedge clk) if (rst_n && ce) begin
    if (s_valid && s_ready) begin q.push_back(s_data); lq.push_back(s_last); end
    if (o_valid && o_ready) begin
      logic [63:0] x;
      real r;
      int e;
      x = q.pop_front();
      r = (x == 0) ? 0.0 : 256.0 * $ln(real'(x));
      e = int'(o_data) - $rtoi(r);
      checks++; nout++;
      if (e > 5 || e < -5) begin failures++; $display("FAIL x %0d got %0d exp %f", x, o_data, r); end
      if (o_last != lq.pop_front()) begin failures++; $display("FAIL last"); end
    end
  end
  initial begin
    ce = 1; s_valid = 0; o_ready = 0; s_data = 0; s_last = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if (!s_valid || s_ready) begin
        s_valid = 1;
        s_data = {$urandom, $urandom} >> $urandom_range(0, 63);
        s_last = ($urandom_range(0, 9) == 0);
      end
      o_ready = ($urandom_range(0, 3) != 0);
      ce = ($urandom_range(0, 7) != 0);
    end
    @(negedge clk); s_valid = 0; o_ready = 1; ce = 1;
    repeat (5) @(negedge clk);
    // rate: 100 values, no stalls, 100 + 1 cycles
    begin
      int c0;
      c0 = nout;
      for (int i = 0; i < 100; i++) begin
        @(negedge clk); s_valid = 1; s_data = 64'd1000 + 64'(i); s_last = 0;
      end
      @(negedge clk); s_valid = 0;
      @(negedge clk);
      checks++;
      if (nout - c0 != 100) begin failures++; $display("FAIL rate %0d", nout - c0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
