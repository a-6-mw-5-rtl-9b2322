// tb_beam_ctrl: checks the accept decision against the threshold (best
// score of the previous frame minus the beam), the best-score tracking
// across frames, the feedback direction (too many acceptances shrink the
// beam, too few widen it), clamping, and that gain 0 keeps the beam fixed.
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_beam_ctrl;
  import asr_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic new_frame, utt_start, arc_valid, accept;
  score_t beam_init, beam_min, beam_max, arc_score, beam, best_prev, threshold;
  logic [15:0] gain, arc_dest_narcs;
  logic [23:0] n_target, n_expected;
  int checks = 0, failures = 0;
  beam_ctrl dut (.*);

  score_t ref_best_cur, ref_best_prev;
  task automatic arc(input score_t s, input logic [15:0] na);
    @(negedge clk); arc_valid = 1; arc_score = s; arc_dest_narcs = na; #1;
    checks++;
    if (accept != (s > ref_best_prev - beam)) begin
      failures++; $display("FAIL accept s=%0d best=%0d beam=%0d", s, ref_best_prev, beam);
    end
    @(posedge clk); if (s > ref_best_cur) ref_best_cur = s;
    @(negedge clk); arc_valid = 0;
  endtask
  task automatic frame();
    @(negedge clk); new_frame = 1; @(posedge clk); ref_best_prev = ref_best_cur;
    ref_best_cur = SCORE_MIN; @(negedge clk); new_frame = 0;
    checks++;
    if (best_prev != ref_best_prev) begin failures++; $display("FAIL best_prev"); end
  endtask
  initial begin
    score_t b0;
    new_frame = 0; utt_start = 0; arc_valid = 0; arc_score = 0; arc_dest_narcs = 0;
    beam_init = 1000; beam_min = 200; beam_max = 3000; gain = 0; n_target = 10;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); utt_start = 1; @(negedge clk); utt_start = 0;
    ref_best_prev = 0; ref_best_cur = SCORE_MIN;
    // fixed beam
    for (int i = 0; i < 50; i++) arc(score_t'($urandom_range(0, 3000)) - 2000, 16'd2);
    checks++; if (beam != 1000) begin failures++; $display("FAIL fixed beam %0d", beam); end
    frame();
    // feedback: frame expects 100 arcs (50 accepted * 2), target 10 -> accepting
    // everything must narrow the beam
    gain = 16'd4000;
    b0 = beam;
    for (int i = 0; i < 20; i++) arc(ref_best_prev + 100, 16'd2);
    checks++; if (!(beam < b0)) begin failures++; $display("FAIL no shrink %0d", beam); end
    checks++; if (n_expected == 0) begin failures++; $display("FAIL n_expected"); end
    // keep accepting: must clamp at beam_min
    for (int i = 0; i < 200; i++) arc(ref_best_prev + 100, 16'd2);
    checks++; if (beam != beam_min) begin failures++; $display("FAIL clamp min %0d", beam); end
    frame();
    // rejecting everything with a large target widens the beam up to beam_max
    n_target = 5000;
    b0 = beam;
    for (int i = 0; i < 30; i++) arc(ref_best_prev - 100000, 16'd1);
    checks++; if (!(beam > b0)) begin failures++; $display("FAIL no widen %0d", beam); end
    for (int i = 0; i < 400; i++) arc(ref_best_prev - 100000, 16'd1);
    checks++; if (beam != beam_max) begin failures++; $display("FAIL clamp max %0d", beam); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
