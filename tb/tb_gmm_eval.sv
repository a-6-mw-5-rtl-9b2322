// tb_gmm_eval: quantization tables and 8 GMMs (1-4 components each, random
// quantizer indices) are placed in the memory model. After the tables are
// loaded, each senone's score is compared with a floating-point reference
// (dequantize, weighted squared distance, log-sum-exp over components;
// tolerance 3/256 nat per component). Also checks: a second request for the
// same senone in the frame hits the cache (no memory reads, few cycles); a
// new frame invalidates the cache; an evaluation from memory streams one
// parameter word per cycle (21 cycles per component plus latency).
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_gmm_eval;
  import asr_pkg::*;
  localparam addr_t QT = 32'h1000, GB = 32'h0;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic load_tables, busy, new_frame, cache_en, req_valid, req_ready, rsp_valid, rsp_ready;
  addr_t gmm_base, qt_base;
  feat_vec_t feat;
  logic [15:0] req_senone;
  score_t rsp_score;
  logic mreq_valid, mreq_ready, mrsp_valid, ev_eval, ev_hit, ev_word;
  mem_req_t mreq; word_t mrsp_data;
  int checks = 0, failures = 0;
  gmm_eval dut (.*);
  ext_mem_model #(.LAT(3)) mem (.clk, .rst_n, .req_valid(mreq_valid), .req_ready(mreq_ready),
    .req_we(mreq.we), .req_addr(mreq.addr), .req_wdata(mreq.wdata), .rsp_valid(mrsp_valid),
    .rsp_data(mrsp_data));

  function automatic real mean_of(int d, int j); return real'((j - 16) * 64 + d) / 256.0; endfunction
  function automatic real ivar_of(int k); return real'((k + 1) * 32) / 256.0; endfunction
  int ncomp [8];

  function automatic real ref_score(int s);
    real acc, comp, sum;
    logic [31:0] ix;
    addr_t p;
    ix = mem.peek(GB + s); p = addr_t'(ix[23:0]);
    sum = 0.0;
    for (int c = 0; c < int'(ix[31:24]); c++) begin
      real dsum = 0.0;
      for (int k = 0; k < 20; k++) begin
        logic [31:0] w;
        w = mem.peek(p + 21 * c + 1 + k);
        for (int h = 0; h < 2; h++) begin
          int d;
          logic [7:0] b;
          d = 2 * k + h;
          b = h ? w[15:8] : w[7:0];
          if (d < FEAT_DIM) begin
            real y;
            y = real'(feat[d]) / 256.0;
            dsum += (y - mean_of(d, int'(b[4:0]))) ** 2 * ivar_of(int'(b[7:5]));
          end
        end
      end
      comp = real'($signed(mem.peek(p + 21 * c))) / 256.0 - 0.5 * dsum;
      sum += $exp(comp);
    end
    return 256.0 * $ln(sum);
  endfunction

  task automatic request(input int s, output score_t sc, output int cyc);
    @(negedge clk); req_valid = 1; req_senone = 16'(s);
    @(negedge clk); req_valid = 0; cyc = 1;
    while (!rsp_valid) begin @(negedge clk); cyc++; end
    sc = rsp_score;
  endtask

  initial begin
    score_t sc; int cyc, r0; real rs;
    load_tables = 0; new_frame = 0; cache_en = 1; req_valid = 0; req_senone = 0; rsp_ready = 1;
    gmm_base = GB; qt_base = QT;
    for (int d = 0; d < FEAT_DIM; d++) begin
      for (int j = 0; j < 32; j++) mem.poke(QT + d * 40 + j, 32'((j - 16) * 64 + d));
      for (int k = 0; k < 8; k++) mem.poke(QT + d * 40 + 32 + k, 32'((k + 1) * 32));
      feat[d] = 16'($urandom_range(0, 2000)) - 16'sd1000;
    end
    for (int s = 0; s < 8; s++) begin
      addr_t p;
      ncomp[s] = 1 + s % 4;
      p = 32'h2000 + 32'(s * 200);
      mem.poke(GB + s, {8'(ncomp[s]), p[23:0]});
      for (int c = 0; c < ncomp[s]; c++) begin
        mem.poke(p + 21 * c, 32'($urandom_range(0, 2000)) - 32'd2000);
        for (int k = 0; k < 20; k++) mem.poke(p + 21 * c + 1 + k, {16'd0, 16'($urandom)});
      end
    end
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); load_tables = 1; @(negedge clk); load_tables = 0;
    @(negedge clk); while (busy) @(negedge clk);
    @(negedge clk); new_frame = 1; @(negedge clk); new_frame = 0;
    for (int s = 0; s < 8; s++) begin
      request(s, sc, cyc);
      rs = ref_score(s);
      checks++;
      if ((real'(sc) - rs) > 3.0 * ncomp[s] || (rs - real'(sc)) > 3.0 * ncomp[s]) begin
        failures++; $display("FAIL senone %0d score %0d ref %f", s, sc, rs);
      end
      checks++;
      if (cyc > 21 * ncomp[s] + 14) begin failures++; $display("FAIL slow %0d cycles", cyc); end
      $display("senone %0d: %0d components, %0d cycles, score %0d (ref %0.1f)", s, ncomp[s], cyc, sc, rs);
    end
    // cache hit in the same frame
    r0 = mem.reads;
    request(5, sc, cyc);
    checks++;
    if (mem.reads != r0 || cyc > 4) begin failures++; $display("FAIL cache hit"); end
    // new frame with new features: recomputed
    for (int d = 0; d < FEAT_DIM; d++) feat[d] = 16'($urandom_range(0, 2000)) - 16'sd1000;
    @(negedge clk); new_frame = 1; @(negedge clk); new_frame = 0;
    request(5, sc, cyc);
    rs = ref_score(5);
    checks++;
    if (mem.reads == r0 || (real'(sc) - rs) > 6.0 || (rs - real'(sc)) > 6.0) begin
      failures++; $display("FAIL after new frame %0d ref %f", sc, rs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
