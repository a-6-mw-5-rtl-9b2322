// asr_top: speech recognition decoder: audio or feature vectors in, word
// IDs out, with speech models in an external memory.
//
// Blocks: host_ctrl (commands, configuration), fe_clk_div and frontend
// (MFCC features at one sixteenth of the clock), a feature vector FIFO,
// viterbi_search (active state lists, WFST arc cache, GMM evaluator with
// score cache, feedback beam pruning, snapshots, backtrace), stats_counters
// and a memory arbiter sharing the external memory between the search and
// host writes.
// Feature vectors reach the FIFO from the front-end or, by host command,
// directly from the host (host has priority). Audio reaches the front-end
// from the audio port or from the host (host has priority).
// External memory port: mem_req_valid/mem_req_ready with {we, addr, wdata}
// (32-bit words); read data returns in request order on mem_rsp_valid.
// Timing: the front-end produces one vector per 10 ms of audio; the search
// time per vector grows with the active hypotheses and memory latency.
// Following the document (Fig. 2): front-end, feature buffer, Viterbi
// search with models in external memory, host control, front-end clock
// divided by 16. This design's: one shared memory port, host priority over
// the direct audio and feature paths, and the byte-wide host link.
module asr_top
  import asr_pkg::*;
#(
  parameter int CAP         = 4096,
  parameter int ARC_ENTRIES = 4096,
  parameter int FEAT_FIFO   = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // host byte link
  input  logic        host_rx_valid,
  output logic        host_rx_ready,
  input  logic [7:0]  host_rx_data,
  output logic        host_tx_valid,
  input  logic        host_tx_ready,
  output logic [7:0]  host_tx_data,
  // audio samples (16 bit, 16 kHz)
  input  logic        audio_valid,
  output logic        audio_ready,
  input  logic signed [15:0] audio_data,
  // external memory
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic        mem_req_we,
  output logic [31:0] mem_req_addr,
  output logic [31:0] mem_req_wdata,
  input  logic        mem_rsp_valid,
  input  logic [31:0] mem_rsp_data,
  // status
  output logic        busy,
  output logic [15:0] frame
);
  // configuration and control
  addr_t start_state, snap_base, gmm_base, qt_base;
  logic [15:0] start_narcs, beam_gain;
  score_t beam_init, beam_min, beam_max, beam;
  logic [23:0] n_target;
  logic arc_cache_en, gmm_cache_en, utt_start, utt_end, load_tables;
  logic w_valid, w_ready, bt_done, frame_end;
  logic [15:0] w_word;
  logic [7:0] stat_sel;
  logic [31:0] stat_value;
  logic [11:0] ev;

  // memory clients: 0 search, 1 host
  logic [1:0] m_v, m_rdy, m_rspv;
  mem_req_t m_req [2];
  word_t m_rsp;
  mem_req_t mem_req;

  // audio and features
  logic h_audio_v, h_audio_r, fe_s_ready;
  logic signed [15:0] h_audio;
  logic h_feat_v, h_feat_r;
  feat_vec_t h_feat, fe_vec, q_vec;
  logic fe_v, fe_r, q_in_v, q_in_r, q_v, q_r;
  logic ce;

  host_ctrl u_host (
    .clk, .rst_n, .rx_valid(host_rx_valid), .rx_ready(host_rx_ready), .rx_data(host_rx_data),
    .tx_valid(host_tx_valid), .tx_ready(host_tx_ready), .tx_data(host_tx_data),
    .mreq_valid(m_v[1]), .mreq_ready(m_rdy[1]), .mreq(m_req[1]),
    .audio_valid(h_audio_v), .audio_ready(h_audio_r), .audio_data(h_audio),
    .feat_valid(h_feat_v), .feat_ready(h_feat_r), .feat(h_feat),
    .utt_start, .utt_end, .load_tables,
    .word_valid(w_valid), .word_ready(w_ready), .word(w_word), .bt_done,
    .stat_sel, .stat_value,
    .start_state, .start_narcs, .snap_base, .gmm_base, .qt_base,
    .beam_init, .beam_min, .beam_max, .beam_gain, .n_target, .arc_cache_en, .gmm_cache_en);

  fe_clk_div u_div (.clk, .rst_n, .ce);

  wire fe_in_valid = h_audio_v || audio_valid;
  wire signed [15:0] fe_in_data = h_audio_v ? h_audio : audio_data;
  assign h_audio_r   = fe_s_ready;
  assign audio_ready = fe_s_ready && !h_audio_v;

  frontend u_fe (
    .clk, .rst_n, .ce, .restart(utt_start), .s_valid(fe_in_valid), .s_ready(fe_s_ready),
    .s_data(fe_in_data), .o_valid(fe_v), .o_ready(fe_r), .o_vec(fe_vec));

  // feature FIFO input: host vectors first, front-end vectors on ce
  assign q_in_v   = h_feat_v || (fe_v && ce);
  assign h_feat_r = q_in_r;
  assign fe_r     = q_in_r && ce && !h_feat_v;
  sync_fifo #(.WIDTH($bits(feat_vec_t)), .DEPTH(FEAT_FIFO)) u_featq (
    .clk, .rst_n, .in_valid(q_in_v), .in_ready(q_in_r), .in_data(h_feat_v ? h_feat : fe_vec),
    .out_valid(q_v), .out_ready(q_r), .out_data(q_vec), .count());

  viterbi_search #(.CAP(CAP), .NBUCKET(CAP), .ARC_ENTRIES(ARC_ENTRIES), .ARC_HT(2 * ARC_ENTRIES))
  u_search (
    .clk, .rst_n, .start_state, .start_narcs, .snap_base, .gmm_base, .qt_base,
    .beam_init, .beam_min, .beam_max, .beam_gain, .n_target, .arc_cache_en, .gmm_cache_en,
    .load_tables, .utt_start, .utt_end, .busy, .frame_end, .frame, .beam,
    .feat_valid(q_v), .feat_ready(q_r), .feat(q_vec),
    .word_valid(w_valid), .word_ready(w_ready), .word(w_word), .bt_done,
    .mem_req_valid(m_v[0]), .mem_req_ready(m_rdy[0]), .mem_req(m_req[0]),
    .mem_rsp_valid(m_rspv[0]), .mem_rsp_data(m_rsp), .ev);

  stats_counters #(.N_EV(12)) u_stats (
    .clk, .rst_n, .utt_start, .frame_end, .ev, .sel(stat_sel), .value(stat_value));

  mem_arbiter #(.N_CLI(2)) u_arb (
    .clk, .rst_n, .cli_req_valid(m_v), .cli_req_ready(m_rdy), .cli_req(m_req),
    .cli_rsp_valid(m_rspv), .cli_rsp_data(m_rsp),
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data);
  assign mem_req_we    = mem_req.we;
  assign mem_req_addr  = mem_req.addr;
  assign mem_req_wdata = mem_req.wdata;
endmodule
