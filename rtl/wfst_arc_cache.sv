// wfst_arc_cache: WFST arc fetch with a cache of isolated arcs.
//
// A request names an arc by (state ID, arc index) and also carries the
// outgoing-arc count of that state. The arc lives at external-memory word
// address state + 3*index (three words, see asr_pkg). Arcs of states with
// 0, 1 or 2 outgoing arcs are cacheable. For those, a hash table of
// HT_SLOTS slots maps the key {state, index} to an address in the data table
// of ENTRIES arcs; a hit returns the stored arc without a memory access. On
// a miss the three words are read from memory. The arc is written into the
// cache only if it is cacheable and "isolated": its page (PAGE_WORDS words,
// 2 kB) differs from the page of the previous arc read from memory. The
// data entry to replace is chosen by a fully associative tree-PLRU over the
// data table; its old hash slot is invalidated. If the new key's hash slot
// is held by a different key, the arc is not cached (no probing).
// Request and response queues decouple the unit from the search. One
// request is handled at a time; a hit takes 2 cycles, a miss the memory
// latency of three reads.
// Following the arc cache description: the cacheable-state rule, the
// isolated-arc rule, PLRU over 4096 entries, a hash table from keys to data
// addresses. This design's choices: the page test against the previous
// fetch, the hash, the slot count and the no-probe insertion.
module wfst_arc_cache
  import asr_pkg::*;
#(
  parameter int ENTRIES    = 4096,
  parameter int HT_SLOTS   = 8192,
  parameter int PAGE_WORDS = 512,
  parameter int FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cache_en,
  input  logic        flush,            // pulse: empty the cache (new utterance)
  input  logic        req_valid,
  output logic        req_ready,
  input  addr_t       req_state,
  input  logic [15:0] req_index,
  input  logic [15:0] req_state_narcs,
  output logic        rsp_valid,
  input  logic        rsp_ready,
  output arc_t        rsp_arc,
  output logic        mreq_valid,
  input  logic        mreq_ready,
  output mem_req_t    mreq,
  input  logic        mrsp_valid,
  input  word_t       mrsp_data,
  output logic        ev_hit,
  output logic        ev_miss,
  output logic        ev_word,
  output logic        ev_page           // a memory fetch to a new page
);
  localparam int EW = $clog2(ENTRIES);
  localparam int HW = $clog2(HT_SLOTS);
  localparam int PW = $clog2(PAGE_WORDS);
  typedef logic [ADDR_W+16-1:0] key_t;

  key_t          ht_key  [HT_SLOTS];
  logic [EW-1:0] ht_addr [HT_SLOTS];
  logic [HT_SLOTS-1:0] ht_v;
  arc_t          d_arc   [ENTRIES];
  logic [HW-1:0] d_slot  [ENTRIES];
  logic [ENTRIES-1:0] d_v;

  logic q_valid, q_pop;
  logic [ADDR_W+32-1:0] q_data;
  sync_fifo #(.WIDTH(ADDR_W+32), .DEPTH(FIFO_DEPTH)) u_reqq (
    .clk, .rst_n, .in_valid(req_valid), .in_ready(req_ready),
    .in_data({req_state, req_index, req_state_narcs}),
    .out_valid(q_valid), .out_ready(q_pop), .out_data(q_data), .count());
  logic r_push, r_ready; arc_t r_arc;
  sync_fifo #(.WIDTH($bits(arc_t)), .DEPTH(FIFO_DEPTH)) u_rspq (
    .clk, .rst_n, .in_valid(r_push), .in_ready(r_ready), .in_data(r_arc),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp_arc), .count());

  typedef enum logic [1:0] {S_IDLE, S_MEM, S_FILL} st_t;
  st_t st;
  key_t key;
  addr_t base;
  logic [HW-1:0] slot;
  logic cacheable;
  logic [1:0] issued, rcvd;
  word_t w0, w1, mrsp_hold;
  arc_t  fetched;
  logic [ADDR_W-PW-1:0] last_page;
  logic last_page_v;

  function automatic logic [HW-1:0] hash(input key_t k);
    logic [47:0] h;
    h = k * 48'h9E3779B97F4B;
    return h[47 -: HW];
  endfunction

  wire addr_t q_state = q_data[ADDR_W+31:32];
  wire [15:0] q_index = q_data[31:16];
  wire [15:0] q_narcs = q_data[15:0];
  key_t q_key;
  logic [HW-1:0] q_slot;
  logic q_cacheable, q_hit;
  always_comb begin
    q_key = {q_state, q_index};
    q_slot = hash(q_key);
    q_cacheable = cache_en && (q_narcs <= 16'd2);
    q_hit = q_cacheable && ht_v[q_slot] && (ht_key[q_slot] == q_key);
  end

  logic [EW-1:0] victim;
  logic touch;
  logic [EW-1:0] touch_way;
  plru_tree #(.WAYS(ENTRIES)) u_plru (.clk, .rst_n, .touch_valid(touch), .touch_way, .victim);

  // fill decision (state S_FILL)
  wire [ADDR_W-PW-1:0] page = base[ADDR_W-1:PW];
  wire isolated = !last_page_v || (page != last_page);
  wire [HW-1:0] vslot = d_slot[victim];
  wire slot_free = !ht_v[slot] || (d_v[victim] && vslot == slot);
  wire do_fill = cacheable && isolated && slot_free;

  assign q_pop  = (st == S_IDLE && q_valid && q_hit && r_ready) || (st == S_FILL && r_ready);
  assign r_push = q_pop;
  assign r_arc  = (st == S_FILL) ? fetched : d_arc[ht_addr[q_slot]];
  assign touch     = (st == S_IDLE && q_pop) || (st == S_FILL && r_ready && do_fill);
  assign touch_way = (st == S_IDLE) ? ht_addr[q_slot] : victim;
  assign ev_hit  = (st == S_IDLE) && q_pop;
  assign ev_miss = (st == S_FILL) && q_pop;
  assign ev_word = (st == S_MEM) && mrsp_valid;
  assign ev_page = (st == S_FILL) && q_pop && isolated;

  assign mreq_valid = (st == S_MEM) && (issued != 2'd3);
  assign mreq = '{we: 1'b0, addr: base + addr_t'(issued), wdata: '0};
  assign fetched = arc_t'({w0, w1, mrsp_hold});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ht_v <= '0; d_v <= '0; key <= '0; base <= '0; slot <= '0;
      cacheable <= 1'b0; issued <= '0; rcvd <= '0; w0 <= '0; w1 <= '0; mrsp_hold <= '0;
      last_page <= '0; last_page_v <= 1'b0;
    end else if (flush) begin
      st <= S_IDLE; ht_v <= '0; d_v <= '0; last_page_v <= 1'b0;
    end else begin
      case (st)
        S_IDLE: if (q_valid && !q_hit) begin
          key <= q_key; slot <= q_slot; cacheable <= q_cacheable;
          base <= q_state + addr_t'(32'(q_index) * ARC_WORDS);
          issued <= '0; rcvd <= '0; st <= S_MEM;
        end
        S_MEM: begin
          if (mreq_valid && mreq_ready) issued <= issued + 1'b1;
          if (mrsp_valid) begin
            rcvd <= rcvd + 1'b1;
            case (rcvd)
              2'd0: w0 <= mrsp_data;
              2'd1: w1 <= mrsp_data;
              default: begin mrsp_hold <= mrsp_data; st <= S_FILL; end
            endcase
          end
        end
        S_FILL: if (r_ready) begin
          last_page <= page; last_page_v <= 1'b1;
          if (do_fill) begin
            if (d_v[victim]) ht_v[vslot] <= 1'b0;
            ht_v[slot]    <= 1'b1;
            ht_key[slot]  <= key;
            ht_addr[slot] <= victim;
            d_arc[victim]  <= fetched;
            d_slot[victim] <= slot;
            d_v[victim]    <= 1'b1;
          end
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
