// viterbi_search: the Viterbi search module. It moves the set of active
// hypotheses forward one frame per feature vector.
//
// Two active state lists (hash tables) hold the hypotheses of frame t (read)
// and of frame t+1 (written); their roles swap at the end of every frame.
// For each feature vector the controller runs these stages in sequence for
// every hypothesis i of the current list and every outgoing arc a:
//   hypothesis fetch  read state ID, score and arc count of entry i
//   arc fetch         request arc (state, a) from the WFST arc cache
//   GMM evaluation    request the acoustic score of the arc's input label
//   pruning           score = hyp score + arc weight + acoustic score,
//                     tested by the feedback beam controller
//   storage           accepted arcs are inserted into the next list with the
//                     destination's arc count, the output label and the
//                     back-pointer i (carried along as metadata)
// After the last hypothesis, a snapshot of the next list ({output label,
// back-pointer} per entry) is written to external memory at
// snap_base + frame*CAP + index, the lists swap and the next vector is
// awaited. utt_start seeds the list with start_state (score 0). utt_end,
// once all queued vectors are consumed, finds the best-scoring final state
// and starts the backtrace, whose words leave on word_valid/word.
// One arc is in flight at a time: the stages follow the search pipeline of
// the document, but overlapping them is left out (this design's choice).
// Four memory clients (arc cache, GMM, snapshot writes, backtrace) share
// the external memory port through a round-robin arbiter.
module viterbi_search
  import asr_pkg::*;
#(
  parameter int CAP         = 4096,
  parameter int NBUCKET     = 4096,
  parameter int ARC_ENTRIES = 4096,
  parameter int ARC_HT      = 8192,
  parameter int N_SENONE    = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  addr_t       start_state,
  input  logic [15:0] start_narcs,
  input  addr_t       snap_base,
  input  addr_t       gmm_base,
  input  addr_t       qt_base,
  input  score_t      beam_init,
  input  score_t      beam_min,
  input  score_t      beam_max,
  input  logic [15:0] beam_gain,
  input  logic [23:0] n_target,
  input  logic        arc_cache_en,
  input  logic        gmm_cache_en,
  // control
  input  logic        load_tables,
  input  logic        utt_start,
  input  logic        utt_end,
  output logic        busy,
  output logic        frame_end,
  output logic [15:0] frame,
  output score_t      beam,
  // feature vectors
  input  logic        feat_valid,
  output logic        feat_ready,
  input  feat_vec_t   feat,
  // recognized words (last word first)
  output logic        word_valid,
  input  logic        word_ready,
  output logic [15:0] word,
  output logic        bt_done,
  // external memory
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output mem_req_t    mem_req,
  input  logic        mem_rsp_valid,
  input  word_t       mem_rsp_data,
  // statistics events
  output logic [11:0] ev
);
  localparam int IW = $clog2(CAP);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_WAIT_FEAT, S_HYP, S_ARC, S_ARCW, S_GMM, S_GMMW,
    S_PRUNE, S_INS, S_SNAP, S_FINAL, S_BT
  } st_t;
  st_t st;

  logic sel;                      // 0: list A current, 1: list B current
  logic [IW:0] i, j;
  logic [IW-1:0] best_i;
  score_t best_s;
  addr_t h_key; score_t h_score; logic [15:0] h_narcs;
  logic [15:0] a;
  arc_t arc;
  score_t total;
  logic utt_end_pending;
  logic ins_sent;            // insert handed to the list, waiting for done

  // ---------------- active state lists ----------------
  logic clr [2];
  logic ins_v [2], ins_rdy [2], ins_done [2];
  logic [1:0] ins_res [2];
  logic [IW-1:0] rd_idx [2];
  addr_t rd_key [2]; score_t rd_score [2]; logic [15:0] rd_narcs [2], rd_olabel [2];
  logic [IW-1:0] rd_bp [2];
  logic [IW:0] cnt [2];
  addr_t ins_key; score_t ins_score; logic [15:0] ins_narcs, ins_olabel; logic [IW-1:0] ins_bp;

  for (genvar g = 0; g < 2; g++) begin : g_list
    active_list #(.CAP(CAP), .NBUCKET(NBUCKET)) u_list (
      .clk, .rst_n, .clear(clr[g]), .ins_valid(ins_v[g]), .ins_ready(ins_rdy[g]),
      .ins_key, .ins_score, .ins_narcs, .ins_olabel, .ins_bp,
      .ins_done(ins_done[g]), .ins_result(ins_res[g]),
      .rd_idx(rd_idx[g]), .rd_key(rd_key[g]), .rd_score(rd_score[g]), .rd_narcs(rd_narcs[g]),
      .rd_olabel(rd_olabel[g]), .rd_bp(rd_bp[g]), .count(cnt[g]));
  end

  // swap multiplexers
  wire c = sel, n = ~sel;
  logic [IW:0] cur_cnt, nxt_cnt;
  assign cur_cnt = cnt[c];
  assign nxt_cnt = cnt[n];
  always_comb begin
    for (int g = 0; g < 2; g++) begin
      if (1'(g) == sel) begin                 // current-frame list
        rd_idx[g] = (st == S_FINAL) ? j[IW-1:0] : i[IW-1:0];
        clr[g]    = (st == S_IDLE) && utt_start;
        ins_v[g]  = (st == S_INIT) && !ins_sent;
      end else begin                          // next-frame list
        rd_idx[g] = j[IW-1:0];
        clr[g]    = ((st == S_IDLE) && utt_start) || ((st == S_WAIT_FEAT) && feat_valid);
        ins_v[g]  = (st == S_INS) && !ins_sent;
      end
    end
    if (st == S_INIT) begin
      ins_key = start_state; ins_score = '0; ins_narcs = start_narcs; ins_olabel = '0; ins_bp = '0;
    end else begin
      ins_key = arc.dest; ins_score = total; ins_narcs = arc.dest_narcs;
      ins_olabel = arc.olabel; ins_bp = i[IW-1:0];
    end
  end
  wire ins_fire_done = ins_done[0] || ins_done[1];
  wire [1:0] ins_result = ins_done[0] ? ins_res[0] : ins_res[1];

  // ---------------- memory clients ----------------
  logic [3:0] m_v, m_rdy, m_rspv;
  mem_req_t m_req [4];
  word_t m_rsp;
  mem_arbiter #(.N_CLI(4)) u_arb (
    .clk, .rst_n, .cli_req_valid(m_v), .cli_req_ready(m_rdy), .cli_req(m_req),
    .cli_rsp_valid(m_rspv), .cli_rsp_data(m_rsp),
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data);

  // ---------------- arc fetch ----------------
  logic af_req_v, af_req_rdy, af_rsp_v;
  arc_t af_arc;
  logic ev_ahit, ev_amiss, ev_aword, ev_apage;
  wfst_arc_cache #(.ENTRIES(ARC_ENTRIES), .HT_SLOTS(ARC_HT)) u_arc (
    .clk, .rst_n, .cache_en(arc_cache_en), .flush(utt_start && st == S_IDLE),
    .req_valid(af_req_v), .req_ready(af_req_rdy), .req_state(h_key), .req_index(a),
    .req_state_narcs(h_narcs), .rsp_valid(af_rsp_v), .rsp_ready(st == S_ARCW),
    .rsp_arc(af_arc), .mreq_valid(m_v[0]), .mreq_ready(m_rdy[0]), .mreq(m_req[0]),
    .mrsp_valid(m_rspv[0]), .mrsp_data(m_rsp),
    .ev_hit(ev_ahit), .ev_miss(ev_amiss), .ev_word(ev_aword), .ev_page(ev_apage));
  assign af_req_v = (st == S_ARC) && (a != h_narcs);

  // ---------------- GMM evaluation ----------------
  logic g_req_rdy, g_rsp_v, g_busy, ev_geval, ev_ghit, ev_gword;
  score_t g_score;
  wire new_frame = (st == S_WAIT_FEAT) && feat_valid;
  gmm_eval #(.N_SENONE(N_SENONE)) u_gmm (
    .clk, .rst_n, .gmm_base, .qt_base, .load_tables, .busy(g_busy),
    .new_frame, .feat, .cache_en(gmm_cache_en),
    .req_valid(st == S_GMM), .req_ready(g_req_rdy), .req_senone(arc.ilabel),
    .rsp_valid(g_rsp_v), .rsp_ready(st == S_GMMW), .rsp_score(g_score),
    .mreq_valid(m_v[1]), .mreq_ready(m_rdy[1]), .mreq(m_req[1]),
    .mrsp_valid(m_rspv[1]), .mrsp_data(m_rsp),
    .ev_eval(ev_geval), .ev_hit(ev_ghit), .ev_word(ev_gword));

  // ---------------- pruning ----------------
  logic accept;
  beam_ctrl u_beam (
    .clk, .rst_n, .new_frame, .beam_init, .utt_start(utt_start && st == S_IDLE),
    .gain(beam_gain), .beam_min, .beam_max, .n_target(n_target),
    .arc_valid(st == S_PRUNE), .arc_score(total), .arc_dest_narcs(arc.dest_narcs),
    .accept, .beam, .best_prev(), .threshold(), .n_expected());

  // ---------------- snapshot writes ----------------
  assign m_v[2] = (st == S_SNAP) && (j != nxt_cnt);
  assign m_req[2] = '{we: 1'b1,
                      addr: snap_base + addr_t'(32'(frame) * CAP) + addr_t'(j),
                      wdata: {rd_olabel[n], 16'(rd_bp[n])}};

  // ---------------- backtrace ----------------
  logic bt_busy;
  backtrace #(.CAP(CAP)) u_bt (
    .clk, .rst_n, .start(st == S_FINAL && j == cur_cnt), .nframes(cur_cnt == '0 ? 16'd0 : frame),
    .best_idx(best_i), .snap_base,
    .mreq_valid(m_v[3]), .mreq_ready(m_rdy[3]), .mreq(m_req[3]),
    .mrsp_valid(m_rspv[3]), .mrsp_data(m_rsp),
    .word_valid, .word_ready, .word, .done(bt_done), .busy(bt_busy));

  assign feat_ready = (st == S_WAIT_FEAT);
  assign busy = (st != S_IDLE) || g_busy;
  assign frame_end = (st == S_SNAP) && (j == nxt_cnt);
  // events: 0 hypotheses expanded, 1 arcs processed, 2 arcs accepted,
  // 3 states stored (new), 4 list overflows, 5 arc cache hits, 6 arc misses,
  // 7 WFST words read, 8 GMM evaluations, 9 GMM cache hits, 10 GMM words read,
  // 11 snapshot words written
  assign ev = {(m_v[2] && m_rdy[2]), ev_gword, ev_ghit, ev_geval, ev_aword, ev_amiss, ev_ahit,
               (st == S_INS && ins_fire_done && ins_result == 2'd3),
               (st == S_INS && ins_fire_done && ins_result == 2'd0),
               (st == S_PRUNE && accept), (st == S_PRUNE),
               (st == S_HYP && i != cur_cnt)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; sel <= 1'b0; i <= '0; j <= '0; frame <= '0; a <= '0;
      h_key <= '0; h_score <= '0; h_narcs <= '0; arc <= '0; total <= '0;
      best_i <= '0; best_s <= SCORE_MIN; utt_end_pending <= 1'b0; ins_sent <= 1'b0;
    end else begin
      if (utt_end) utt_end_pending <= 1'b1;
      if ((ins_v[0] && ins_rdy[0]) || (ins_v[1] && ins_rdy[1])) ins_sent <= 1'b1;
      if (ins_fire_done) ins_sent <= 1'b0;
      case (st)
        S_IDLE: if (utt_start) begin
          sel <= 1'b0; frame <= '0; utt_end_pending <= 1'b0; st <= S_INIT;
        end
        S_INIT: if (ins_fire_done) st <= S_WAIT_FEAT;
        S_WAIT_FEAT: begin
          if (feat_valid) begin
            i <= '0; st <= S_HYP;
          end else if (utt_end_pending) begin
            j <= '0; best_s <= SCORE_MIN; best_i <= '0; st <= S_FINAL;
          end
        end
        S_HYP: begin
          if (i == cur_cnt) begin j <= '0; st <= S_SNAP; end
          else begin
            h_key <= rd_key[c]; h_score <= rd_score[c]; h_narcs <= rd_narcs[c];
            a <= '0; st <= S_ARC;
          end
        end
        S_ARC: begin
          if (a == h_narcs) begin i <= i + 1'b1; st <= S_HYP; end
          else if (af_req_rdy) st <= S_ARCW;
        end
        S_ARCW: if (af_rsp_v) begin arc <= af_arc; st <= S_GMM; end
        S_GMM:  if (g_req_rdy) st <= S_GMMW;
        S_GMMW: if (g_rsp_v) begin
                    total <= sat_score(64'(h_score) + 64'(arc.weight) + 64'(g_score));
          st <= S_PRUNE;
        end
        S_PRUNE: begin
          if (accept) st <= S_INS;
          else begin a <= a + 1'b1; st <= S_ARC; end
        end
        S_INS: if (ins_fire_done) begin a <= a + 1'b1; st <= S_ARC; end
        S_SNAP: begin
          if (j == nxt_cnt) begin
            sel <= ~sel; frame <= frame + 1'b1; st <= S_WAIT_FEAT;
          end else if (m_rdy[2]) j <= j + 1'b1;
        end
        S_FINAL: begin
          if (j == cur_cnt) st <= S_BT;
          else begin
            if (rd_score[c] > best_s) begin best_s <= rd_score[c]; best_i <= j[IW-1:0]; end
            j <= j + 1'b1;
          end
        end
        S_BT: if (bt_done) begin utt_end_pending <= 1'b0; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
