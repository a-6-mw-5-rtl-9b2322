// tb_viterbi_search: decodes a small hand-built recognition network
// end to end against the external memory model.
//
// Network (4 states, 2 arcs each, 3 senones): start -> A (word 5) or B
// (word 7); A and B loop on themselves and lead to M (word 9); M loops and
// leads back to B (word 7). Senone s has one Gaussian whose means all sit
// at quantizer level 4s+2, and the feature vector for "senone s" equals
// those means, so the frame sequence 1,1,1,3,3,3,2,2,2 must decode as
// words 5, 9, 7 (emitted last first: 7, 9, 5). The utterance is run twice
// (second time with warm caches). Checks: decoded words, one frame_end per
// vector, snapshot words in memory, each counted mechanism non-zero
// (hypotheses, arcs, accepted arcs, new states, arc cache hits and misses,
// GMM evaluations and cache hits, snapshot writes), and a cycle bound per
// frame for this network.
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_viterbi_search;
  import asr_pkg::*;
  localparam addr_t S = 32'h200, A = 32'h400, B = 32'h600, M = 32'h800;  // one 512-word page each
  localparam addr_t SNAP = 32'h10000, GB = 32'h4000, QT = 32'h8000;
  localparam int CAP = 64;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  addr_t start_state, snap_base, gmm_base, qt_base;
  logic [15:0] start_narcs, beam_gain, frame, word;
  score_t beam_init, beam_min, beam_max, beam;
  logic [23:0] n_target;
  logic arc_cache_en, gmm_cache_en, load_tables, utt_start, utt_end, busy, frame_end;
  logic feat_valid, feat_ready, word_valid, word_ready, bt_done;
  feat_vec_t feat;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req; word_t mem_rsp_data;
  logic [11:0] ev;
  int checks = 0, failures = 0;
  viterbi_search #(.CAP(CAP), .NBUCKET(16)) dut (.*);
  ext_mem_model #(.LAT(4)) mem (.clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_we(mem_req.we), .req_addr(mem_req.addr), .req_wdata(mem_req.wdata),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  int evc [12];
  int nframe_end = 0;
  logic [15:0] words [$];
  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < 12; e++) if (ev[e]) evc[e]++;
    if (frame_end) nframe_end++;
    if (word_valid && word_ready) words.push_back(word);
  end

  task automatic arc(input addr_t at, input addr_t dest, input int w, input int il, input int ol);
    mem.poke(at, dest);
    mem.poke(at + 1, {16'(w), 16'(il)});
    mem.poke(at + 2, {16'(ol), 16'd2});
  endtask

  task automatic utterance(input int pass);
    int seq [9] = '{1, 1, 1, 3, 3, 3, 2, 2, 2};
    int f0, t;
    words.delete();
    f0 = nframe_end;
    @(negedge clk); utt_start = 1; @(negedge clk); utt_start = 0;
    for (int f = 0; f < 9; f++) begin
      for (int d = 0; d < FEAT_DIM; d++) feat[d] = 16'((4 * seq[f] + 2 - 16) * 64);
      feat_valid = 1;
      t = 0;
      #1;
      while (!feat_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      feat_valid = 0;
      while (nframe_end == f0 + f) begin @(negedge clk); t++; end
      checks++;
      if (t > 800) begin failures++; $display("FAIL frame %0d took %0d cycles", f, t); end
      if (pass == 0) $display("frame %0d: %0d cycles, beam %0d", f, t, beam);
    end
    @(negedge clk); utt_end = 1; @(negedge clk); utt_end = 0;
    t = 0;
    while (!bt_done && t < 5000) begin @(negedge clk); t++; end
    repeat (3) @(negedge clk);
    checks++;
    if (nframe_end - f0 != 9) begin failures++; $display("FAIL frame_end count %0d", nframe_end - f0); end
    checks++;
    if (words.size() != 3 || words[0] != 16'd7 || words[1] != 16'd9 || words[2] != 16'd5) begin
      failures++; $display("FAIL pass %0d words %p", pass, words);
    end
    checks++;
    if (frame != 16'd9) begin failures++; $display("FAIL frame counter %0d", frame); end
  endtask

  initial begin
    logic [31:0] sw;
    start_state = S; start_narcs = 2; snap_base = SNAP; gmm_base = GB; qt_base = QT;
    beam_init = 32'h0010_0000; beam_min = 256; beam_max = 32'h0040_0000; beam_gain = 0;
    n_target = 2048; arc_cache_en = 1; gmm_cache_en = 1;
    load_tables = 0; utt_start = 0; utt_end = 0; feat_valid = 0; word_ready = 1; feat = '0;
    for (int e = 0; e < 12; e++) evc[e] = 0;
    // network
    arc(S,     A, -128, 1, 5); arc(S + 3, B, -128, 2, 7);
    arc(A,     A,  -64, 1, 0); arc(A + 3, M, -128, 3, 9);
    arc(B,     B,  -64, 2, 0); arc(B + 3, M, -128, 3, 9);
    arc(M,     M,  -64, 3, 0); arc(M + 3, B, -128, 2, 7);
    // quantization tables: mean level j = (j - 16) / 4, inverse variance (k + 1) / 8
    for (int d = 0; d < FEAT_DIM; d++) begin
      for (int j = 0; j < 32; j++) mem.poke(QT + 32'(d * 40 + j), 32'((j - 16) * 64));
      for (int k = 0; k < 8; k++) mem.poke(QT + 32'(d * 40 + 32 + k), 32'((k + 1) * 32));
    end
    // senones 1..3: one component, g = 0, all means at level 4s + 2, ivar index 3
    for (int s = 1; s <= 3; s++) begin
      addr_t p;
      logic [7:0] q;
      p = 32'h5000 + 32'(s * 32);
      q = {3'd3, 5'(4 * s + 2)};
      mem.poke(GB + 32'(s), {8'd1, p[23:0]});
      mem.poke(p, 32'd0);
      for (int k = 0; k < 20; k++) mem.poke(p + 1 + 32'(k), {16'd0, q, q});
    end
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); load_tables = 1; @(negedge clk); load_tables = 0;
    repeat (3) @(negedge clk);
    while (busy) @(negedge clk);
    utterance(0);
    // snapshot of frame 0 holds the two states reached from the start state
    sw = mem.peek(SNAP);
    checks++;
    if (sw[31:16] != 16'd5 && sw[31:16] != 16'd7) begin failures++; $display("FAIL snapshot word %h", sw); end
    utterance(1);
    begin
      string nm [12] = '{"hypotheses", "arcs", "accepted arcs", "new states", "overflows",
                         "arc cache hits", "arc cache misses", "WFST words", "GMM evaluations",
                         "GMM cache hits", "GMM words", "snapshot writes"};
      for (int e = 0; e < 12; e++) begin
        $display("%s: %0d", nm[e], evc[e]);
        if (e != 4) begin
          checks++;
          if (evc[e] == 0) begin failures++; $display("FAIL no %s", nm[e]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
