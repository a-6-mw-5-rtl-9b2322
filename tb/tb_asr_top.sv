// tb_asr_top: end-to-end and full-size test of the decoder with its
// default parameters (4096-entry active lists and arc cache, 4096
// senones). The external memory model holds a small recognition network
// and three single-Gaussian senones (see tb_viterbi_search); the
// quantization tables are written through the host memory-write command.
// Everything else goes through the host byte link:
//   utterance 1  host feature vectors for senones 1,1,1,3,3,3,2,2,2 with
//                feedback beam control on; the words returned must be
//                7, 9, 5 then the 0xFFFF terminator; statistics read back
//                must be non-zero.
//   utterance 2  1520 audio samples on the audio port pass through the
//                front-end (8 frames, 4 vectors after the delta stage); the
//                search runs on them with a wide beam and must return at
//                least one word before the 0xFFFF terminator.
//   utterance 3  a start state with 5000 arcs to distinct states fills the
//                4096-entry list; the overflow counter must be non-zero.
// Each mechanism is counted and a count of zero fails: host memory writes,
// front-end vectors, host feature vectors, list swaps, arc cache hits and
// misses, GMM evaluations and cache hits, beam changes, snapshot writes,
// backtrace words, statistics reads, overflows. Per-frame search cycles
// for utterance 1 are bounded (800 cycles per frame for this network).
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_asr_top;
  import asr_pkg::*;
  localparam addr_t S = 32'h200, A = 32'h400, B = 32'h600, M = 32'h800, FAN = 32'h30_0000;
  localparam addr_t GB = 32'h0080_0000, QT = 32'h00F0_0000, SNAP = 32'h0100_0000;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic host_rx_valid, host_rx_ready, host_tx_valid, host_tx_ready;
  logic [7:0] host_rx_data, host_tx_data;
  logic audio_valid, audio_ready;
  logic signed [15:0] audio_data;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [31:0] mem_req_addr, mem_req_wdata, mem_rsp_data;
  logic busy;
  logic [15:0] frame;
  int checks = 0, failures = 0;
  asr_top dut (.*);
  ext_mem_model #(.LAT(4), .STALL(1'b1)) mem (.clk, .rst_n, .req_valid(mem_req_valid),
    .req_ready(mem_req_ready), .req_we(mem_req_we), .req_addr(mem_req_addr),
    .req_wdata(mem_req_wdata), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  // mechanism counters
  int n_hostwr = 0, n_fevec = 0, n_hfeat = 0, n_swap = 0, n_beamchg = 0, n_btword = 0;
  int n_stat = 0, n_frame_end = 0;
  int evc [12];
  logic [7:0] rxq [$];
  logic prev_sel;
  score_t prev_beam;
  always @(posedge clk) if (rst_n) begin
    if (dut.m_v[1] && dut.m_rdy[1]) n_hostwr++;
    if (dut.fe_v && dut.fe_r) n_fevec++;
    if (dut.h_feat_v && dut.h_feat_r) n_hfeat++;
    if (dut.u_search.sel != prev_sel) n_swap++;
    prev_sel <= dut.u_search.sel;
    if (dut.beam != prev_beam) n_beamchg++;
    prev_beam <= dut.beam;
    if (dut.w_valid && dut.w_ready) n_btword++;
    if (dut.frame_end) n_frame_end++;
    for (int e = 0; e < 12; e++) if (dut.ev[e]) evc[e]++;
    if (host_tx_valid && host_tx_ready) rxq.push_back(host_tx_data);
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic send(input logic [7:0] b);
    host_rx_valid = 1; host_rx_data = b;
    #1;
    while (!host_rx_ready) begin @(negedge clk); #1; end
    @(negedge clk); host_rx_valid = 0;
  endtask
  task automatic send16(input logic [15:0] v); send(v[15:8]); send(v[7:0]); endtask
  task automatic send32(input logic [31:0] v); send16(v[31:16]); send16(v[15:0]); endtask
  task automatic set_reg(input int r, input logic [31:0] v); send(8'h04); send(8'(r)); send32(v); endtask
  task automatic recv(output logic [7:0] b);
    int t;
    t = 0;
    while (rxq.size() == 0 && t < 2000000) begin @(negedge clk); t++; end
    b = (rxq.size() != 0) ? rxq.pop_front() : 8'hEE;
  endtask
  task automatic read_stat(input int sel, output logic [31:0] v);
    logic [7:0] b;
    send(8'h05); send(8'(sel));
    for (int i = 0; i < 4; i++) begin recv(b); v = {v[23:0], b}; end
    n_stat++;
  endtask
  task automatic end_utt(output logic [15:0] w [$]);
    logic [7:0] hi, lo;
    w.delete();
    send(8'h07);
    do begin recv(hi); recv(lo); w.push_back({hi, lo}); end while ({hi, lo} != 16'hFFFF && {hi, lo} != 16'hEEEE);
  endtask
  task automatic arc(input addr_t at, input addr_t dest, input int w, input int il, input int ol, input int dn);
    mem.poke(at, dest);
    mem.poke(at + 1, {16'(w), 16'(il)});
    mem.poke(at + 2, {16'(ol), 16'(dn)});
  endtask

  initial begin
    logic [15:0] words [$];
    logic [31:0] v;
    int seq [9] = '{1, 1, 1, 3, 3, 3, 2, 2, 2};
    host_rx_valid = 0; host_rx_data = 0; host_tx_ready = 1; audio_valid = 0; audio_data = 0;
    for (int e = 0; e < 12; e++) evc[e] = 0;
    prev_sel = 0; prev_beam = '0;
    arc(S,     A, -128, 1, 5, 2); arc(S + 3, B, -128, 2, 7, 2);
    arc(A,     A,  -64, 1, 0, 2); arc(A + 3, M, -128, 3, 9, 2);
    arc(B,     B,  -64, 2, 0, 2); arc(B + 3, M, -128, 3, 9, 2);
    arc(M,     M,  -64, 3, 0, 2); arc(M + 3, B, -128, 2, 7, 2);
    for (int k = 0; k < 5000; k++) arc(FAN + 32'(3 * k), 32'h40_0000 + 32'(4 * k), -64, 1, 0, 0);
    for (int s = 1; s <= 3; s++) begin
      addr_t p;
      logic [7:0] q;
      p = 32'h0090_0000 + 32'(s * 32);
      q = {3'd3, 5'(4 * s + 2)};
      mem.poke(GB + 32'(s), {8'd1, p[23:0]});
      mem.poke(p, 32'd0);
      for (int k = 0; k < 20; k++) mem.poke(p + 1 + 32'(k), {16'd0, q, q});
    end
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // quantization tables through the host: one write command per dimension
    for (int d = 0; d < FEAT_DIM; d++) begin
      send(8'h01); send32(QT + 32'(d * 40)); send16(16'd40);
      for (int j = 0; j < 32; j++) send32(32'((j - 16) * 64));
      for (int k = 0; k < 8; k++) send32(32'((k + 1) * 32));
    end
    repeat (20) @(negedge clk);
    chk(mem.peek(QT + 32'(38 * 40 + 39)) == 32'd256, "host memory write");
    set_reg(0, S); set_reg(1, 2);
    set_reg(8, 32'h0000_4000); set_reg(9, 32'd2);     // feedback beam control on
    send(8'h08);
    repeat (200) @(negedge clk);
    while (busy) @(negedge clk);

    // utterance 1: host feature vectors
    send(8'h06);
    for (int f = 0; f < 9; f++) begin
      int t, fe0;
      fe0 = n_frame_end;
      send(8'h03);
      for (int d = 0; d < FEAT_DIM; d++) send16(16'((4 * seq[f] + 2 - 16) * 64));
      t = 0;
      while (n_frame_end == fe0 && t < 100000) begin @(negedge clk); t++; end
      chk(t <= 800, $sformatf("utterance 1 frame %0d took %0d cycles", f, t));
    end
    end_utt(words);
    chk(words.size() == 4 && words[0] == 16'd7 && words[1] == 16'd9 && words[2] == 16'd5,
        $sformatf("utterance 1 words %p", words));
    $display("utterance 1 words: %p", words);
    for (int e = 0; e < 12; e++) if (e != 4 && e != 7) begin
      read_stat(12 + e, v);
      chk(v != 0 && (e == 10 || int'(v) == evc[e]), $sformatf("statistic %0d read %0d counted %0d", e, v, evc[e]));
    end

    // utterance 2: audio through the front-end
    // toy senones fit real audio badly: open the beam so hypotheses survive
    set_reg(8, 32'd0); set_reg(5, 32'h4000_0000); set_reg(7, 32'h4000_0000);
    send(8'h06);
    fork
      for (int n = 0; n < 1520; n++) begin
        @(negedge clk);
        audio_valid = 1;
        audio_data = 16'($rtoi(5000.0 * $sin(0.2 * real'(n)) + 2000.0 * $sin(0.05 * real'(n))));
        #1;
        while (!audio_ready) begin @(negedge clk); #1; end
      end
    join
    @(negedge clk); audio_valid = 0;
    begin
      int t;
      t = 0;
      while (n_fevec < 4 && t < 1000000) begin @(negedge clk); t++; end
    end
    repeat (100) @(negedge clk);
    while (busy && !dut.u_search.feat_ready) @(negedge clk);
    chk(n_fevec == 4, $sformatf("front-end vectors %0d", n_fevec));
    end_utt(words);
    chk(words.size() >= 2 && words[words.size() - 1] == 16'hFFFF, "utterance 2 words and terminator");
    $display("utterance 2 words: %p", words);

    // utterance 3: 5000 successors overflow the 4096-entry list
    set_reg(0, FAN); set_reg(1, 5000); set_reg(5, 32'h0010_0000);
    send(8'h06);
    send(8'h03);
    for (int d = 0; d < FEAT_DIM; d++) send16(16'((4 * 1 + 2 - 16) * 64));
    end_utt(words);
    read_stat(12 + 4, v);
    chk(v != 0, "overflow statistic");
    $display("overflows: %0d, stored %0d", v, evc[3]);

    $display("host writes %0d, fe vectors %0d, host vectors %0d, swaps %0d, beam changes %0d, bt words %0d, stat reads %0d",
             n_hostwr, n_fevec, n_hfeat, n_swap, n_beamchg, n_btword, n_stat);
    $display("events: %p", evc);
    chk(n_hostwr > 0, "no host memory writes");
    chk(n_fevec > 0, "no front-end vectors");
    chk(n_hfeat > 0, "no host feature vectors");
    chk(n_swap > 0, "no list swaps");
    chk(n_beamchg > 0, "no beam changes");
    chk(n_btword > 0, "no backtrace words");
    chk(n_stat > 0, "no statistics reads");
    for (int e = 0; e < 12; e++) chk(evc[e] > 0, $sformatf("event %0d never happened", e));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #60000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
