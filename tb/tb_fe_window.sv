// tb_fe_window: streams 1200 random samples with a random clock enable and
// checks every emitted frame: 512 values, the first 400 equal to the
// samples times a Hamming window computed in the testbench (within 1 LSB),
// the rest zero, frame starts advancing by 160 samples, and the number of
// frames.
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_fe_window;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic ce, restart, s_valid, s_ready, o_valid, o_ready, o_last;
  logic signed [15:0] s_data, o_data;
  int checks = 0, failures = 0;
  fe_window dut (.*);
  logic signed [15:0] x [1200];
  int sent = 0, frame = 0, n = 0;
  always @(posedge clk) if (rst_n && ce) begin
    if (s_valid && s_ready) sent++;
    if (o_valid && o_ready) begin
      real w, r;
      int e;
      w = 0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * real'(n) / 399.0);
      r = (n < 400) ? real'(x[frame * 160 + n]) * w : 0.0;
      e = int'(o_data) - $rtoi(r);
      checks++;
      if (e > 2 || e < -2) begin failures++; $display("FAIL frame %0d n %0d got %0d exp %f", frame, n, o_data, r); end
      if (o_last != (n == 511)) begin failures++; $display("FAIL last"); end
      n++;
      if (n == 512) begin n = 0; frame++; end
    end
  end
  always_comb s_data = x[sent < 1200 ? sent : 0];
  initial begin
    for (int i = 0; i < 1200; i++) x[i] = 16'($urandom);
    ce = 0; restart = 0; s_valid = 0; o_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 20000 && (sent < 1200 || o_valid || frame < 6); t++) begin
      @(negedge clk);
      ce = ($urandom_range(0, 3) != 0);
      s_valid = (sent < 1200) && ($urandom_range(0, 1) == 1);
      o_ready = ($urandom_range(0, 4) != 0);
    end
    // frames fully available: 1 + (1200 - 400) / 160 = 6
    checks++;
    if (frame != 6) begin failures++; $display("FAIL frames %0d", frame); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
