// active_list: one active state list, a hash table keyed by WFST state ID.
//
// Entries are stored in allocation order in an entry array of CAP slots, so
// the hypothesis fetch can walk them by index 0..count-1. A bucket table of
// NBUCKET heads (selected by a hash of the key) points at the first entry of
// each chain; each entry holds a next pointer, so collisions are resolved by
// chaining. An insert walks the chain one entry per cycle: if the key is
// found, the stored hypothesis is replaced when the new score is higher
// (Viterbi max); otherwise a new entry is appended while count < CAP, and
// the insert is dropped (overflow) when the list is full. clear empties the
// list in one cycle by resetting the bucket valid flags and count.
// Interface: ins_valid/ins_ready handshake starts an insert; ins_done pulses
// with ins_result when it completes. rd_idx/rd_entry is a combinational
// read port for hypothesis fetch, snapshot and final-state search.
// Capacity 4096 follows the architecture; the bucket count, the hash and the
// stored fields are this design's choices.
module active_list
  import asr_pkg::*;
#(
  parameter int CAP     = 4096,
  parameter int NBUCKET = 4096
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic ins_valid,
  output logic ins_ready,
  input  addr_t            ins_key,
  input  score_t           ins_score,
  input  logic [15:0]      ins_narcs,
  input  logic [15:0]      ins_olabel,
  input  logic [$clog2(CAP)-1:0] ins_bp,
  output logic             ins_done,
  output logic [1:0]       ins_result,   // 0 new, 1 updated, 2 kept old, 3 overflow
  input  logic [$clog2(CAP)-1:0] rd_idx,
  output addr_t            rd_key,
  output score_t           rd_score,
  output logic [15:0]      rd_narcs,
  output logic [15:0]      rd_olabel,
  output logic [$clog2(CAP)-1:0] rd_bp,
  output logic [$clog2(CAP):0]   count
);
  localparam int IW = $clog2(CAP);
  localparam int BW = $clog2(NBUCKET);

  typedef struct packed {
    addr_t          key;
    score_t         score;
    logic [15:0]    narcs;
    logic [15:0]    olabel;
    logic [IW-1:0]  bp;
    logic           has_next;
    logic [IW-1:0]  next;
  } entry_t;

  entry_t         ent  [CAP];
  logic [IW-1:0]  head [NBUCKET];
  logic [NBUCKET-1:0] head_v;

  typedef enum logic [1:0] {S_IDLE, S_WALK} st_t;
  st_t st;
  addr_t k; score_t sc; logic [15:0] na, ol; logic [IW-1:0] bpr, cur;

  function automatic logic [BW-1:0] hash(input addr_t key);
    logic [31:0] h;
    h = key * 32'h9E3779B1;
    return h[31 -: BW];
  endfunction

  assign ins_ready = (st == S_IDLE) && !clear;
  assign rd_key    = ent[rd_idx].key;
  assign rd_score  = ent[rd_idx].score;
  assign rd_narcs  = ent[rd_idx].narcs;
  assign rd_olabel = ent[rd_idx].olabel;
  assign rd_bp     = ent[rd_idx].bp;

  wire full = (count == (IW+1)'(CAP));
  logic [BW-1:0] hb;
  assign hb = hash(ins_key);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; head_v <= '0; count <= '0; ins_done <= 1'b0; ins_result <= '0;
      k <= '0; sc <= '0; na <= '0; ol <= '0; bpr <= '0; cur <= '0;
    end else begin
      ins_done <= 1'b0;
      if (clear) begin
        head_v <= '0; count <= '0; st <= S_IDLE;
      end else case (st)
        S_IDLE: if (ins_valid) begin
          k <= ins_key; sc <= ins_score; na <= ins_narcs; ol <= ins_olabel; bpr <= ins_bp;
          if (!head_v[hb]) begin
            ins_done <= 1'b1;
            if (full) ins_result <= 2'd3;
            else begin
              ent[count[IW-1:0]] <= '{key: ins_key, score: ins_score, narcs: ins_narcs,
                                      olabel: ins_olabel, bp: ins_bp, has_next: 1'b0, next: '0};
              head[hb]   <= count[IW-1:0];
              head_v[hb] <= 1'b1;
              count      <= count + 1'b1;
              ins_result <= 2'd0;
            end
          end else begin
            cur <= head[hb];
            st  <= S_WALK;
          end
        end
        S_WALK: begin
          if (ent[cur].key == k) begin
            ins_done <= 1'b1; st <= S_IDLE;
            if (sc > ent[cur].score) begin
              ent[cur].score  <= sc; ent[cur].narcs <= na;
              ent[cur].olabel <= ol; ent[cur].bp    <= bpr;
              ins_result <= 2'd1;
            end else ins_result <= 2'd2;
          end else if (ent[cur].has_next) begin
            cur <= ent[cur].next;
          end else begin
            ins_done <= 1'b1; st <= S_IDLE;
            if (full) ins_result <= 2'd3;
            else begin
              ent[count[IW-1:0]] <= '{key: k, score: sc, narcs: na, olabel: ol, bp: bpr,
                                      has_next: 1'b0, next: '0};
              ent[cur].has_next <= 1'b1;
              ent[cur].next     <= count[IW-1:0];
              count      <= count + 1'b1;
              ins_result <= 2'd0;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
