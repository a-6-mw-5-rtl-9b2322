// tb_stats_counters: random event pulses over several frames; checks the
// per-frame registers against counts kept in the testbench after every
// frame end, the utterance totals, and clearing at utterance start.
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_stats_counters;
  localparam int N = 12;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic utt_start, frame_end;
  logic [N-1:0] ev;
  logic [7:0] sel;
  logic [31:0] value;
  int checks = 0, failures = 0;
  int fr [N], tot [N];
  stats_counters #(.N_EV(N)) dut (.*);
  initial begin
    utt_start = 0; frame_end = 0; ev = '0; sel = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      for (int i = 0; i < N; i++) fr[i] = 0;
      for (int c = 0; c < 100; c++) begin
        @(negedge clk);
        ev = N'($urandom);
        frame_end = (c == 99);
        for (int i = 0; i < N; i++) begin fr[i] += ev[i]; tot[i] += ev[i]; end
        @(posedge clk);
      end
      @(negedge clk); ev = '0; frame_end = 0;
      for (int i = 0; i < N; i++) begin
        sel = 8'(i); #1; checks++;
        if (value != 32'(fr[i])) begin failures++; $display("FAIL frame %0d ev %0d %0d/%0d", f, i, value, fr[i]); end
        sel = 8'(N + i); #1; checks++;
        if (value != 32'(tot[i])) begin failures++; $display("FAIL total ev %0d", i); end
      end
    end
    @(negedge clk); utt_start = 1; @(negedge clk); utt_start = 0;
    sel = 8'(N); #1; checks++;
    if (value != 0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
