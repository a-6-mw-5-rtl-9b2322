// tb_wfst_arc_cache: WFST arcs for 40 states are placed in the memory model,
// states with 1-2 arcs each on its own 2 kB page and states with 5 arcs
// packed together. Random arc requests must return exactly the arc stored
// in memory. Checks: repeated requests for arcs of 1-2-arc states hit the
// cache without memory reads; arcs of 5-arc states never hit; with the
// cache disabled nothing hits; a hit answers within 4 cycles.
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_wfst_arc_cache;
  import asr_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic cache_en, flush, req_valid, req_ready, rsp_valid, rsp_ready;
  addr_t req_state; logic [15:0] req_index, req_state_narcs;
  arc_t rsp_arc;
  logic mreq_valid, mreq_ready, mrsp_valid;
  mem_req_t mreq; word_t mrsp_data;
  logic ev_hit, ev_miss, ev_word, ev_page;
  int checks = 0, failures = 0, hits = 0, hits_big = 0;
  wfst_arc_cache dut (.*);
  ext_mem_model #(.LAT(4), .STALL(1'b1)) mem (.clk, .rst_n, .req_valid(mreq_valid), .req_ready(mreq_ready),
    .req_we(mreq.we), .req_addr(mreq.addr), .req_wdata(mreq.wdata), .rsp_valid(mrsp_valid),
    .rsp_data(mrsp_data));
  always @(posedge clk) begin
    if (ev_hit) hits++;
    if (ev_hit && req_state_narcs > 2) hits_big++;
  end

  addr_t st_addr [40]; int st_n [40];
  task automatic request(input int s, input int idx, output int lat);
    arc_t exp_a;
    int t;
    exp_a = arc_t'({mem.peek(st_addr[s] + 3 * idx), mem.peek(st_addr[s] + 3 * idx + 1),
                    mem.peek(st_addr[s] + 3 * idx + 2)});
    @(negedge clk); req_valid = 1; req_state = st_addr[s]; req_index = 16'(idx);
    req_state_narcs = 16'(st_n[s]);
    @(posedge clk); while (!req_ready) @(posedge clk);
    @(negedge clk); req_valid = 0; t = 1;
    while (!rsp_valid) begin @(negedge clk); t++; end
    checks++;
    if (rsp_arc != exp_a) begin failures++; $display("FAIL arc s=%0d i=%0d got %h exp %h hit=%0d", s, idx, rsp_arc, exp_a, dut.st); end
    lat = t;
  endtask
  initial begin
    int lat, r0, h0;
    cache_en = 1; flush = 0; req_valid = 0; req_state = 0; req_index = 0; req_state_narcs = 0;
    rsp_ready = 1;
    for (int s = 0; s < 40; s++) begin
      st_n[s] = (s < 30) ? 1 + s % 2 : 5;
      st_addr[s] = (s < 30) ? addr_t'(s * 512 + 17) : addr_t'(30 * 512 + (s - 30) * 15);
      for (int w = 0; w < 3 * st_n[s]; w++) mem.poke(st_addr[s] + w, $urandom);
    end
    repeat (2) @(posedge clk); rst_n = 1;
    // warm-up then random traffic
    for (int i = 0; i < 600; i++) begin
      int s;
      s = $urandom_range(0, 39);
      request(s, $urandom_range(0, st_n[s] - 1), lat);
    end
    checks++; if (hits == 0) begin failures++; $display("FAIL no hits"); end
    checks++; if (hits_big != 0) begin failures++; $display("FAIL big-state hits"); end
    // immediate repeat of an isolated arc hits, without memory reads, quickly
    request(3, 0, lat); request(35, 1, lat); request(7, 0, lat);
    r0 = mem.reads; h0 = hits;
    request(7, 0, lat);
    checks++; if (hits != h0 + 1 || mem.reads != r0) begin failures++; $display("FAIL repeat hit"); end
    checks++; if (lat > 4) begin failures++; $display("FAIL hit latency %0d", lat); end
    // cache disabled: no hits
    cache_en = 0; h0 = hits;
    for (int i = 0; i < 100; i++) begin
      int s; s = $urandom_range(0, 39);
      request(s, $urandom_range(0, st_n[s] - 1), lat);
    end
    checks++; if (hits != h0) begin failures++; $display("FAIL hits while disabled"); end
    $display("hits=%0d memory reads=%0d", hits, mem.reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
