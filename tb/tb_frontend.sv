// tb_frontend: runs the whole MFCC chain at real-time pace. The clock
// enable is high one cycle in 16 and a new 16 kHz sample is offered every
// 39 enabled cycles (a 625 kHz front-end clock). Two passes of the same
// 2160-sample signal (a tone plus noise), separated by restart, must each
// give 12 - 4 = 8 feature vectors, identical between passes; every sample
// must be accepted before the next one is due (real-time rate check); the
// vectors must not be all zero and the statics must not saturate.
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_frontend;
  import asr_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic ce, restart, s_valid, s_ready, o_valid, o_ready;
  logic signed [15:0] s_data;
  feat_vec_t o_vec;
  int checks = 0, failures = 0;
  frontend dut (.*);
  logic [3:0] div;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) div <= '0; else div <= div + 1'b1;
  assign ce = (div == 4'd15);
  localparam int NS = 2160;
  logic signed [15:0] audio [NS];
  feat_vec_t vecs [2][$];
  int pass = 0;
  always @(posedge clk) if (rst_n && ce && o_valid && o_ready) vecs[pass].push_back(o_vec);
  initial begin
    restart = 0; s_valid = 0; o_ready = 1; s_data = 0;
    for (int n = 0; n < NS; n++)
      audio[n] = 16'($rtoi(6000.0 * $sin(2.0 * 3.14159265358979 * 1000.0 * real'(n) / 16000.0))
                     + $urandom_range(0, 600)) - 16'sd300;
    repeat (2) @(posedge clk); rst_n = 1;
    for (pass = 0; pass < 2; pass++) begin
      int late;
      late = 0;
      for (int n = 0; n < NS; n++) begin
        int waited;
        waited = 0;
        @(negedge clk); s_valid = 1; s_data = audio[n];
        while (!(ce && s_ready)) begin
          @(negedge clk);
          if (ce) waited++;
        end
        @(negedge clk); s_valid = 0;
        if (waited > 38) late++;
        // pace: remaining enabled cycles of this sample's 39
        for (int w = waited + 1; w < 39; w++) begin
          @(negedge clk); while (!ce) @(negedge clk);
        end
      end
      repeat (16 * 4000) @(negedge clk);
      checks++;
      if (late != 0) begin failures++; $display("FAIL %0d samples missed the real-time rate", late); end
      checks++;
      if (vecs[pass].size() != 8) begin failures++; $display("FAIL pass %0d vectors %0d", pass, vecs[pass].size()); end
      @(negedge clk); restart = 1;
      repeat (16) @(negedge clk); restart = 0;
    end
    for (int i = 0; i < 8 && i < vecs[0].size() && i < vecs[1].size(); i++) begin
      checks++;
      if (vecs[0][i] != vecs[1][i]) begin failures++; $display("FAIL vector %0d differs between passes", i); end
      checks++;
      if (vecs[0][i] == '0) begin failures++; $display("FAIL vector %0d is zero", i); end
      for (int d = 0; d < 13; d++) begin
        checks++;
        if (vecs[0][i][d] == 16'sh7fff || vecs[0][i][d] == 16'sh8000) begin failures++; $display("FAIL saturated %0d %0d", i, d); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #40000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
