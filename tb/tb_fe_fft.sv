// tb_fe_fft: feeds frames of random and sinusoidal real samples and
// compares the 257 power values with a direct 512-point DFT computed in the
// testbench: |X[k]|^2 * (64/256)^2 (the unit's input gain 2^6 and
// 1/256 scaling). Tolerance: 1% of the frame's peak power plus a small
// absolute term. Also checks the cycle count per frame (512 + 1024 + 257).
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_fe_fft;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic ce, s_valid, s_ready, o_valid, o_ready, o_last;
  logic signed [15:0] s_data;
  logic [47:0] o_power;
  int checks = 0, failures = 0;
  fe_fft dut (.*);
  real ref_p [257];
  real peak;
  initial begin
    ce = 1; s_valid = 0; o_ready = 1; s_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int fr = 0; fr < 3; fr++) begin
      logic signed [15:0] x [512];
      int cyc, k;
      for (int n = 0; n < 512; n++)
        case (fr)
          0: x[n] = 16'($rtoi(8000.0 * $cos(2.0 * 3.14159265358979 * 37.0 * real'(n) / 512.0)));
          1: x[n] = 16'($urandom_range(0, 8000)) - 16'sd4000;
          default: x[n] = (n < 400) ? 16'($rtoi(3000.0 * $sin(0.3 * real'(n)) + 1000.0 * $cos(1.7 * real'(n)))) : 16'sd0;
        endcase
      peak = 0.0;
      for (int kk = 0; kk <= 256; kk++) begin
        real re, im;
        re = 0.0; im = 0.0;
        for (int n = 0; n < 512; n++) begin
          re += real'(x[n]) * $cos(2.0 * 3.14159265358979 * real'(kk * n) / 512.0);
          im -= real'(x[n]) * $sin(2.0 * 3.14159265358979 * real'(kk * n) / 512.0);
        end
        ref_p[kk] = (re * re + im * im) / 16.0;
        if (ref_p[kk] > peak) peak = ref_p[kk];
      end
      cyc = 0;
      for (int n = 0; n < 512; n++) begin
        @(negedge clk); s_valid = 1; s_data = x[n]; cyc++;
      end
      @(negedge clk); s_valid = 0;
      while (!o_valid) begin @(negedge clk); cyc++; end
      k = 0;
      while (o_valid) begin
        real err;
        err = real'(o_power) - ref_p[k];
        if (err < 0) err = -err;
        checks++;
        if (err > 0.01 * peak + 4096.0) begin
          failures++; $display("FAIL frame %0d k %0d got %0d ref %f", fr, k, o_power, ref_p[k]);
        end
        if (o_last != (k == 256)) begin failures++; $display("FAIL last at %0d", k); end
        k++;
        @(negedge clk); cyc++;
      end
      checks++;
      if (k != 257 || cyc > 512 + 1024 + 257 + 4) begin failures++; $display("FAIL count %0d cycles %0d", k, cyc); end
      $display("frame %0d: %0d cycles", fr, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
