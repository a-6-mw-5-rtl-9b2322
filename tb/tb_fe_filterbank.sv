// tb_fe_filterbank: feeds frames of 257 random power values and compares
// the 26 band energies with a triangular mel filter bank computed in the
// testbench in floating point (tolerance 0.1% of the band plus a small
// absolute term) and the 27th output with the exact total power. Checks
// o_last and the cycle count per frame (257 inputs + 27 outputs).
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_fe_filterbank;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic ce, s_valid, s_ready, s_last, o_valid, o_ready, o_last;
  logic [47:0] s_power;
  logic [63:0] o_data;
  int checks = 0, failures = 0;
  fe_filterbank dut (.*);
  function automatic real mel(input real f);
    return 1127.0 * $ln(1.0 + f / 700.0);
  endfunction
  initial begin
    ce = 1; s_valid = 0; o_ready = 1; s_power = 0; s_last = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int fr = 0; fr < 4; fr++) begin
      real band [28];
      logic [63:0] tot;
      int cyc, nb;
      for (int b = 0; b < 28; b++) band[b] = 0.0;
      tot = 0; cyc = 0;
      for (int k = 0; k < 257; k++) begin
        real m, step, w;
        int c;
        @(negedge clk);
        s_valid = 1; s_last = (k == 256);
        s_power = (fr == 0) ? 48'd1000000 : 48'({$urandom, $urandom} >> $urandom_range(16, 40));
        tot += 64'(s_power);
        step = mel(8000.0) / 27.0;
        m = mel(real'(k) * 8000.0 / 256.0);
        c = $rtoi(m / step);
        w = 1.0 - (m / step - real'(c));
        if (c > 26) begin c = 26; w = 0.0; end
        band[c] += real'(s_power) * w;
        band[c + 1] += real'(s_power) * (1.0 - w);
        cyc++;
      end
      @(negedge clk); s_valid = 0; s_last = 0;
      nb = 0;
      while (nb < 27) begin
        if (o_valid) begin
          real err, ref_v;
          ref_v = (nb == 26) ? real'(tot) : band[nb + 1];
          err = real'(o_data) - ref_v;
          if (err < 0) err = -err;
          checks++;
          if (err > 0.001 * ref_v + 64.0) begin failures++; $display("FAIL frame %0d band %0d got %0d exp %f", fr, nb, o_data, ref_v); end
          if (o_last != (nb == 26)) begin failures++; $display("FAIL last"); end
          nb++;
        end
        @(negedge clk); cyc++;
        if (cyc > 400) break;
      end
      checks++;
      if (nb != 27 || cyc > 257 + 27 + 2) begin failures++; $display("FAIL outputs %0d cycles %0d", nb, cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
