// tb_host_ctrl: sends every command as a byte stream and checks the
// resulting register values, memory writes, audio samples, feature vector,
// control pulses, statistics read-back bytes, and the word list returned
// after end of utterance (2 bytes per word, then 0xFFFF).
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_host_ctrl;
  import asr_pkg::*;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;
  logic mreq_valid, mreq_ready, audio_valid, audio_ready, feat_valid, feat_ready;
  mem_req_t mreq;
  logic signed [15:0] audio_data;
  feat_vec_t feat;
  logic utt_start, utt_end, load_tables, word_valid, word_ready, bt_done;
  logic [15:0] word;
  logic [7:0] stat_sel;
  logic [31:0] stat_value;
  addr_t start_state, snap_base, gmm_base, qt_base;
  logic [15:0] start_narcs, beam_gain;
  score_t beam_init, beam_min, beam_max;
  logic [23:0] n_target;
  logic arc_cache_en, gmm_cache_en;
  int checks = 0, failures = 0;
  int n_start = 0, n_end = 0, n_load = 0;
  logic [31:0] wr_addr [$], wr_data [$];
  logic [15:0] aud [$];
  logic [7:0] txq [$];
  feat_vec_t fv_got;
  host_ctrl dut (.*);

  assign stat_value = 32'hA0B0C000 | 32'(stat_sel);
  always @(posedge clk) begin
    if (mreq_valid && mreq_ready) begin wr_addr.push_back(mreq.addr); wr_data.push_back(mreq.wdata); end
    if (audio_valid && audio_ready) aud.push_back(audio_data);
    if (feat_valid && feat_ready) fv_got <= feat;
    if (tx_valid && tx_ready) txq.push_back(tx_data);
    if (utt_start) n_start++;
    if (utt_end) n_end++;
    if (load_tables) n_load++;
    mreq_ready <= ($urandom_range(0, 2) != 0);
    audio_ready <= ($urandom_range(0, 2) != 0);
    feat_ready <= ($urandom_range(0, 2) != 0);
    tx_ready <= ($urandom_range(0, 2) != 0);
  end
  task automatic send(input logic [7:0] b);
    @(negedge clk); rx_valid = 1; rx_data = b;
    @(posedge clk); while (!rx_ready) @(posedge clk);
    @(negedge clk); rx_valid = 0;
  endtask
  task automatic send32(input logic [31:0] v);
    send(v[31:24]); send(v[23:16]); send(v[15:8]); send(v[7:0]);
  endtask
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    feat_vec_t fv;
    rx_valid = 0; rx_data = 0; word_valid = 0; word = 0; bt_done = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    send(8'h04); send(8'd9); send32(32'h0000_1234);
    send(8'h04); send(8'd0); send32(32'h0040_0000);
    send(8'h04); send(8'd5); send32(32'hFFFF_F000);
    send(8'h04); send(8'd10); send32(32'h0000_0002);
    repeat (3) @(posedge clk);
    chk(n_target == 24'h1234, "n_target");
    chk(start_state == 32'h0040_0000, "start_state");
    chk(beam_init == -32'sd4096, "beam_init");
    chk(gmm_cache_en && !arc_cache_en, "flags");
    // memory writes
    send(8'h01); send32(32'h0000_0100); send(8'h00); send(8'h03);
    send32(32'h11111111); send32(32'h22222222); send32(32'h33333333);
    repeat (10) @(posedge clk);
    chk(wr_addr.size() == 3 && wr_addr[0] == 32'h100 && wr_addr[2] == 32'h102, "write addresses");
    chk(wr_data.size() == 3 && wr_data[1] == 32'h22222222, "write data");
    // audio
    send(8'h02); send(8'h00); send(8'h04);
    for (int i = 0; i < 4; i++) begin send(8'(i)); send(8'hA0 + 8'(i)); end
    repeat (10) @(posedge clk);
    chk(aud.size() == 4 && aud[3] == 16'h03A3 && aud[0] == 16'h00A0, "audio");
    // feature vector
    send(8'h03);
    for (int d = 0; d < FEAT_DIM; d++) begin fv[d] = 16'($urandom); send(fv[d][15:8]); send(fv[d][7:0]); end
    repeat (10) @(posedge clk);
    chk(fv_got == fv, "feature vector");
    // statistics read
    send(8'h05); send(8'd7);
    repeat (20) @(posedge clk);
    chk(txq.size() == 4 && {txq[0], txq[1], txq[2], txq[3]} == 32'hA0B0C007, "stat read");
    txq.delete();
    // control pulses
    send(8'h06); send(8'h08);
    repeat (3) @(posedge clk);
    chk(n_start == 1 && n_load == 1, "start/load pulses");
    // end of utterance: three words then done
    send(8'h07);
    repeat (3) @(posedge clk);
    chk(n_end == 1, $sformatf("end pulse %0d", n_end));
    for (int w = 0; w < 3; w++) begin
      @(negedge clk); word_valid = 1; word = 16'(100 + w);
      @(posedge clk); while (!word_ready) @(posedge clk);
      @(negedge clk); word_valid = 0;
    end
    @(negedge clk); bt_done = 1; @(negedge clk); bt_done = 0;
    repeat (40) @(posedge clk);
    chk(txq.size() == 8, "word bytes");
    if (txq.size() == 8)
      chk({txq[0], txq[1]} == 16'd100 && {txq[4], txq[5]} == 16'd102 && {txq[6], txq[7]} == 16'hFFFF,
          "word values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
