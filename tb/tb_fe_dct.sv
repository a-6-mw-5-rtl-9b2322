// tb_fe_dct: feeds sets of 26 random log energies plus a log power and
// compares the 12 cepstral outputs with a floating-point DCT-II
// (sqrt(2/26) scaling, tolerance 4 LSB) and element 12 with the log power.
// Checks the cycle count (27 inputs + 12 x 26 multiply-accumulates).
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_fe_dct;
  import asr_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic ce, s_valid, s_ready, s_last, o_valid, o_ready;
  feat_t s_data;
  static_vec_t o_vec;
  int checks = 0, failures = 0;
  fe_dct dut (.*);
  initial begin
    ce = 1; s_valid = 0; o_ready = 1; s_data = 0; s_last = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      feat_t m [27];
      int cyc;
      for (int j = 0; j < 27; j++) m[j] = 16'($urandom_range(0, 6000)) - 16'sd1000;
      cyc = 0;
      for (int j = 0; j < 27; j++) begin
        @(negedge clk); s_valid = 1; s_data = m[j]; s_last = (j == 26); cyc++;
        while (!s_ready) begin @(negedge clk); cyc++; end
      end
      @(negedge clk); s_valid = 0; s_last = 0;
      while (!o_valid) begin @(negedge clk); cyc++; end
      for (int i = 0; i < 12; i++) begin
        real r;
        int e;
        r = 0.0;
        for (int j = 0; j < 26; j++)
          r += real'(m[j]) * $cos(3.14159265358979 * real'(i + 1) * (real'(j) + 0.5) / 26.0);
        r *= $sqrt(2.0 / 26.0);
        e = int'(o_vec[i]) - $rtoi(r);
        checks++;
        if (e > 4 || e < -4) begin failures++; $display("FAIL set %0d c%0d got %0d exp %f", t, i + 1, o_vec[i], r); end
      end
      checks++;
      if (o_vec[12] != m[26]) begin failures++; $display("FAIL log power"); end
      checks++;
      if (cyc > 27 + 12 * 26 + 3) begin failures++; $display("FAIL cycles %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
