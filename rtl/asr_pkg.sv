// asr_pkg: types and constants shared by the speech decoder.
//
// Scores are natural-log likelihoods in signed fixed point with SCORE_FRAC
// fractional bits (1/256 nat); larger is better. WFST states are identified
// by the external-memory word address of their first outgoing arc, and each
// arc occupies ARC_WORDS consecutive 32-bit words:
//   word 0: destination state ID
//   word 1: {weight[15:0] (signed log-probability, 1/256 nat), input label[15:0] (senone ID)}
//   word 2: {output label[15:0] (word ID, 0 = none), outgoing-arc count of destination[15:0]}
// Feature vectors are 39 signed 16-bit values with 8 fractional bits.
// All of these encodings are this design's choices; the widths of the
// feature (16 bit, 39 dimensions) and of the quantizer indices (5-bit mean,
// 3-bit inverse variance) follow the architecture description.
package asr_pkg;
  localparam int FEAT_DIM   = 39;
  localparam int FEAT_W     = 16;
  localparam int SCORE_W    = 32;
  localparam int SCORE_FRAC = 8;
  localparam int ADDR_W     = 32;
  localparam int DATA_W     = 32;
  localparam int ARC_WORDS  = 3;
  localparam int N_STATIC   = 13;   // 12 cepstra + log power
  localparam int N_MEL      = 26;

  typedef logic signed [SCORE_W-1:0] score_t;
  typedef logic [ADDR_W-1:0]         addr_t;
  typedef logic [DATA_W-1:0]         word_t;
  typedef logic signed [FEAT_W-1:0]  feat_t;
  typedef feat_t [FEAT_DIM-1:0]      feat_vec_t;
  typedef feat_t [N_STATIC-1:0]      static_vec_t;

  localparam score_t SCORE_MIN = {1'b1, {(SCORE_W-1){1'b0}}};

  typedef struct packed {
    addr_t              dest;
    logic signed [15:0] weight;
    logic [15:0]        ilabel;
    logic [15:0]        olabel;
    logic [15:0]        dest_narcs;
  } arc_t;

  typedef struct packed {
    logic  we;
    addr_t addr;
    word_t wdata;
  } mem_req_t;

  // Saturate a wide signed value to a score.
  function automatic score_t sat_score(input logic signed [63:0] v);
    if (v > 64'sd2147483647)       return 32'sh7fffffff;
    else if (v < -64'sd2147483648) return 32'sh80000000;
    else                           return score_t'(v);
  endfunction
endpackage
