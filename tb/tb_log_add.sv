// tb_log_add: checks log(e^a + e^b) against a floating-point reference for
// random and edge-case score pairs (tolerance 2/256 nat).
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_log_add;
  import asr_pkg::*;
  score_t a, b, y;
  int checks = 0, failures = 0;
  log_add dut (.a, .b, .y);
  task automatic check(input score_t ta, input score_t tb);
    real ra, rb, m, ref_v;
    a = ta; b = tb; #1;
    ra = real'(ta) / 256.0; rb = real'(tb) / 256.0;
    m = (ra > rb) ? ra : rb;
    ref_v = m + $ln(1.0 + $exp(-((ra > rb) ? ra - rb : rb - ra)));
    checks++;
    if ((real'(y) / 256.0 - ref_v) > 0.008 || (ref_v - real'(y) / 256.0) > 0.008) begin
      failures++;
      $display("FAIL a=%0d b=%0d y=%0d ref=%f", ta, tb, y, ref_v * 256.0);
    end
  endtask
  initial begin
    check(0, 0); check(100, -100); check(-5000, -5000); check(-2000, 5000);
    check(0, -4095); check(0, -4096); check(0, -100000);
    for (int i = 0; i < 2000; i++)
      check(score_t'($urandom_range(0, 200000)) - 100000, score_t'($urandom_range(0, 20000)) - 10000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
