// gmm_eval: acoustic log-likelihood of one senone (GMM) for the current
// feature vector, with a per-frame score cache and quantized parameters.
//
// A request carries a senone ID. If the score cache holds a valid score for
// that senone in this frame, it is returned at once (cache hit). Otherwise
// the senone's GMM is read from external memory and evaluated:
//   index word at gmm_base + senone: {component count[7:0], pointer[23:0]}
//   per component, at pointer + 21*c: word 0 = g_c (signed, score units),
//   words 1..20 = one dimension pair each, bits [7:0] for dimension 2k and
//   [15:8] for dimension 2k+1, each {inverse-variance index[7:5], mean index[4:0]}.
// Each index pair is decoded through per-dimension quantization tables (32
// mean levels, 8 inverse-variance levels, 16 bits each) held in a dual-port
// table memory; two arithmetic units (subtract, square, multiply-accumulate)
// handle the two dimensions of a pair, so a 39-dimensional component takes
// 20 cycles at one parameter word per cycle. Component score:
//   s_c = g_c - (sum_k (y_k - mu_k)^2 * ivar_k) >> DIST_SHIFT
// (features and means Q8, inverse variances Q8; DIST_SHIFT = 17 gives score
// units of 1/256 nat including the factor 1/2). Component scores are
// combined with the log-add unit. The result is written to the score cache.
// load_tables reads the quantization tables from qt_base (for each
// dimension 32 mean words then 8 inverse-variance words, value in bits
// [15:0]). new_frame loads the feature vector and invalidates the cache.
// The cache, quantizer sizes, table memory, pairwise evaluation and log-add
// follow the GMM evaluator description; the memory layout, the fixed-point
// formats and the direct-mapped cache organisation are this design's.
module gmm_eval
  import asr_pkg::*;
#(
  parameter int N_SENONE   = 4096,
  parameter int DIST_SHIFT = 17,
  parameter int FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  addr_t       gmm_base,
  input  addr_t       qt_base,
  input  logic        load_tables,   // pulse: read quantization tables
  output logic        busy,
  input  logic        new_frame,     // pulse: latch feat, invalidate cache
  input  feat_vec_t   feat,
  input  logic        cache_en,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [15:0] req_senone,
  output logic        rsp_valid,
  input  logic        rsp_ready,
  output score_t      rsp_score,
  // external memory client
  output logic        mreq_valid,
  input  logic        mreq_ready,
  output mem_req_t    mreq,
  input  logic        mrsp_valid,
  input  word_t       mrsp_data,
  // statistics events
  output logic        ev_eval,
  output logic        ev_hit,
  output logic        ev_word
);
  localparam int SW = $clog2(N_SENONE);
  localparam int WPC = 21;            // words per component

  // score cache
  score_t cache [N_SENONE];
  logic [N_SENONE-1:0] cache_v;
  // quantization tables and feature memory
  logic signed [15:0] mean_tab [FEAT_DIM*32];
  logic [15:0]        ivar_tab [FEAT_DIM*8];
  feat_vec_t          fv;

  // request / response queues
  logic q_valid, q_pop; logic [15:0] q_sen;
  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_reqq (
    .clk, .rst_n, .in_valid(req_valid), .in_ready(req_ready), .in_data(req_senone),
    .out_valid(q_valid), .out_ready(q_pop), .out_data(q_sen), .count());
  logic r_push, r_ready; score_t r_score;
  sync_fifo #(.WIDTH(SCORE_W), .DEPTH(FIFO_DEPTH)) u_rspq (
    .clk, .rst_n, .in_valid(r_push), .in_ready(r_ready), .in_data(r_score),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp_score), .count());

  typedef enum logic [2:0] {S_IDLE, S_IDX, S_RUN, S_DONE, S_QT} st_t;
  st_t st;
  logic [SW-1:0] sen;
  logic [23:0] ptr;
  logic [7:0]  ncomp;
  logic [15:0] total, issued, rcvd;
  logic [4:0]  pos;          // word position inside a component
  logic [7:0]  comp;
  score_t      gc, acc_score;
  logic [53:0] dist_acc;
  logic        idx_issued, qt_pending;

  wire [SW-1:0] q_idx = q_sen[SW-1:0];

  // ---- pairwise distance datapath (two units) ----
  logic [5:0] dA, dB;
  logic [53:0] contrib;
  function automatic logic [49:0] unit(input feat_t y, input logic signed [15:0] mu,
                                       input logic [15:0] iv);
    logic signed [16:0] d;
    logic [33:0] d2;
    d  = 17'(y) - 17'(mu);
    d2 = 34'($signed(d) * $signed(d));
    return 50'(d2) * 50'(iv);
  endfunction
  always_comb begin
    logic [49:0] ua, ub;
    dA = 6'(2 * (int'(pos) - 1));
    dB = dA + 6'd1;
    ua = unit(fv[dA], mean_tab[int'(dA)*32 + int'(mrsp_data[4:0])],
              ivar_tab[int'(dA)*8 + int'(mrsp_data[7:5])]);
    if (int'(dB) < FEAT_DIM)
      ub = unit(fv[dB], mean_tab[int'(dB)*32 + int'(mrsp_data[12:8])],
                ivar_tab[int'(dB)*8 + int'(mrsp_data[15:13])]);
    else ub = '0;
    contrib = 54'(ua) + 54'(ub);
  end
  // component score and log-add
  score_t comp_score, la_out;
  logic [53:0] dist_all, dist_sh;
  always_comb begin
    dist_all = dist_acc + contrib;
    dist_sh  = dist_all >> DIST_SHIFT;
    comp_score = sat_score(64'(gc) - ((dist_sh > 54'h7fffffff) ? 64'sh7fffffff : 64'(dist_sh)));
  end
  log_add u_la (.a(acc_score), .b(comp_score), .y(la_out));

  // ---- memory requests ----
  logic [15:0] qt_total;
  assign qt_total = 16'(FEAT_DIM * 40);
  always_comb begin
    mreq_valid = 1'b0;
    mreq = '{we: 1'b0, addr: '0, wdata: '0};
    case (st)
      S_IDX: if (!idx_issued) begin
        mreq_valid = 1'b1; mreq.addr = gmm_base + addr_t'(sen);
      end
      S_RUN: if (issued < total) begin
        mreq_valid = 1'b1; mreq.addr = addr_t'(ptr) + addr_t'(issued);
      end
      S_QT: if (issued < qt_total) begin
        mreq_valid = 1'b1; mreq.addr = qt_base + addr_t'(issued);
      end
      default: ;
    endcase
  end

  wire hit = cache_en && cache_v[q_idx];
  assign q_pop  = (st == S_IDLE && q_valid && hit && r_ready && !qt_pending) ||
                  (st == S_DONE && r_ready);
  assign r_push = q_pop;
  assign r_score = (st == S_DONE) ? acc_score : cache[q_idx];
  assign busy = (st == S_QT) || qt_pending;
  assign ev_hit  = (st == S_IDLE) && q_pop;
  assign ev_eval = (st == S_DONE) && q_pop;
  assign ev_word = mrsp_valid;

  always_ff @(posedge clk) if (new_frame) fv <= feat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cache_v <= '0; sen <= '0; ptr <= '0; ncomp <= '0; total <= '0;
      issued <= '0; rcvd <= '0; pos <= '0; comp <= '0; gc <= '0; acc_score <= '0;
      dist_acc <= '0; idx_issued <= 1'b0; qt_pending <= 1'b0;
    end else begin
      if (load_tables) qt_pending <= 1'b1;
      if (new_frame) cache_v <= '0;
      case (st)
        S_IDLE: begin
          if (qt_pending) begin
            st <= S_QT; issued <= '0; rcvd <= '0;
          end else if (q_valid && !hit) begin
            sen <= q_idx; idx_issued <= 1'b0; st <= S_IDX;
          end
        end
        S_IDX: begin
          if (mreq_valid && mreq_ready) idx_issued <= 1'b1;
          if (mrsp_valid) begin
            ncomp <= mrsp_data[31:24];
            ptr   <= mrsp_data[23:0];
            total <= 16'(mrsp_data[31:24]) * 16'(WPC);
            issued <= '0; rcvd <= '0; pos <= '0; comp <= '0; dist_acc <= '0;
            acc_score <= SCORE_MIN;
            st <= (mrsp_data[31:24] == 8'd0) ? S_DONE : S_RUN;
          end
        end
        S_RUN: begin
          if (mreq_valid && mreq_ready) issued <= issued + 1'b1;
          if (mrsp_valid) begin
            rcvd <= rcvd + 1'b1;
            if (pos == 5'd0) begin
              gc <= score_t'(mrsp_data);
              pos <= 5'd1;
            end else if (pos == 5'(WPC - 1)) begin
              acc_score <= (comp == 8'd0) ? comp_score : la_out;
              dist_acc <= '0;
              pos  <= 5'd0;
              comp <= comp + 1'b1;
              if (comp + 1'b1 == ncomp) st <= S_DONE;
            end else begin
              dist_acc <= dist_all;
              pos  <= pos + 1'b1;
            end
          end
        end
        S_DONE: if (r_ready) begin
          cache[sen]   <= acc_score;
          cache_v[sen] <= 1'b1;
          st <= S_IDLE;
        end
        S_QT: begin
          qt_pending <= 1'b0;
          if (mreq_valid && mreq_ready) issued <= issued + 1'b1;
          if (mrsp_valid) begin
            rcvd <= rcvd + 1'b1;
            if (rcvd + 1'b1 == qt_total) st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // quantization table loading
  always_ff @(posedge clk) begin
    if (st == S_QT && mrsp_valid) begin
      if (int'(rcvd) % 40 < 32) mean_tab[(int'(rcvd) / 40) * 32 + int'(rcvd) % 40] <= mrsp_data[15:0];
      else                      ivar_tab[(int'(rcvd) / 40) * 8 + int'(rcvd) % 40 - 32] <= mrsp_data[15:0];
    end
  end
endmodule
