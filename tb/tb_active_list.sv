// tb_active_list: random inserts (with many repeated keys) against an
// associative-array reference: the list must keep one entry per key with
// the highest score and its metadata, count distinct keys, report
// new/updated/kept/overflow correctly, stop at capacity, and clear.
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_active_list;
  import asr_pkg::*;
  localparam int CAP = 64;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic clear, ins_valid, ins_ready, ins_done;
  addr_t ins_key, rd_key; score_t ins_score, rd_score;
  logic [15:0] ins_narcs, ins_olabel, rd_narcs, rd_olabel;
  logic [5:0] ins_bp, rd_idx, rd_bp;
  logic [1:0] ins_result;
  logic [6:0] count;
  int checks = 0, failures = 0;
  active_list #(.CAP(CAP), .NBUCKET(16)) dut (.*);
  score_t ref_s [addr_t];
  logic [15:0] ref_o [addr_t];
  int cycles_max = 0;

  task automatic ins(input addr_t k, input score_t s);
    int exp_res, t;
    logic [15:0] o;
    o = 16'($urandom);
    if (!ref_s.exists(k)) exp_res = (ref_s.size() >= CAP) ? 3 : 0;
    else exp_res = (s > ref_s[k]) ? 1 : 2;
    @(negedge clk); ins_valid = 1; ins_key = k; ins_score = s; ins_olabel = o;
    ins_narcs = 16'(k); ins_bp = 6'(k);
    @(posedge clk); #1; ins_valid = 0; t = 0;
    while (!ins_done) begin @(posedge clk); #1; t++; end
    if (t > cycles_max) cycles_max = t;
    checks++;
    if (int'(ins_result) != exp_res) begin
      failures++; $display("FAIL result key=%0d got %0d exp %0d", k, ins_result, exp_res);
    end
    if (exp_res == 0 || exp_res == 1) begin ref_s[k] = s; ref_o[k] = o; end
  endtask
  task automatic verify();
    int found;
    checks++;
    if (int'(count) != ref_s.size()) begin failures++; $display("FAIL count %0d %0d", count, ref_s.size()); end
    found = 0;
    for (int i = 0; i < int'(count); i++) begin
      rd_idx = 6'(i); #1;
      checks++;
      if (!ref_s.exists(rd_key) || ref_s[rd_key] != rd_score || ref_o[rd_key] != rd_olabel) begin
        failures++; $display("FAIL entry %0d key=%0d", i, rd_key);
      end else found++;
    end
  endtask
  initial begin
    clear = 0; ins_valid = 0; ins_key = 0; ins_score = 0; ins_narcs = 0; ins_olabel = 0;
    ins_bp = 0; rd_idx = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) ins(addr_t'($urandom_range(0, 40) * 3), score_t'($urandom_range(0, 1000)));
    verify();
    // fill to overflow
    for (int i = 0; i < 100; i++) ins(addr_t'(1000 + i * 7), score_t'(i));
    verify();
    checks++; if (count != 7'(CAP)) begin failures++; $display("FAIL not full"); end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    ref_s.delete(); ref_o.delete();
    for (int i = 0; i < 50; i++) ins(addr_t'($urandom_range(0, 20)), score_t'($urandom_range(0, 1000)));
    verify();
    $display("longest insert: %0d cycles", cycles_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
