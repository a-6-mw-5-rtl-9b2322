// log_add: computes log(e^a + e^b) for two scores in the log domain.
//
// With m = max(a,b) and d = |a-b|, the result is m + log(1 + e^-d). The
// correction term, which lies in [0, log 2], comes from a lookup table of
// LUT_N entries of 16 bits indexed by d in score units (1/256 nat); for d
// beyond the table the correction is 0. The default 4096 x 16-bit table is
// the 64 kb ROM size given for the log adder, and the table covers d < 16
// nats. The table contents are computed at elaboration from the formula
// round(2^SCORE_FRAC * ln(1 + exp(-i / 2^SCORE_FRAC))).
// Purely combinational; the caller registers the result.
// Following the document: the max-plus-table form of the log-add and the
// 64 kb table size. This design's: the table resolution and range.
module log_add
  import asr_pkg::*;
#(
  parameter int LUT_N = 4096
) (
  input  score_t a,
  input  score_t b,
  output score_t y
);
  typedef logic [15:0] lut_t [LUT_N];
  function automatic lut_t gen_lut();
    lut_t r;
    for (int i = 0; i < LUT_N; i++)
      r[i] = 16'($rtoi(real'(1 << SCORE_FRAC) *
                       $ln(1.0 + $exp(-real'(i) / real'(1 << SCORE_FRAC))) + 0.5));
    return r;
  endfunction
  localparam lut_t LUT = gen_lut();

  score_t m;
  logic [SCORE_W:0] d;
  logic [15:0] corr;
  always_comb begin
    if (a >= b) begin
      m = a;
      d = (SCORE_W+1)'($signed({a[SCORE_W-1], a}) - $signed({b[SCORE_W-1], b}));
    end else begin
      m = b;
      d = (SCORE_W+1)'($signed({b[SCORE_W-1], b}) - $signed({a[SCORE_W-1], a}));
    end
    corr = (d < (SCORE_W+1)'(LUT_N)) ? LUT[d[$clog2(LUT_N)-1:0]] : 16'd0;
    y = sat_score(64'(m) + 64'(corr));
  end
endmodule
