// fe_deltas: first- and second-order time differences and assembly of the
// 39-dimensional feature vector.
//
// Keeps the last five static vectors c[t-2..t+2]. When c[t+2] arrives it
// outputs, for frame t:
//   statics        c[t]
//   first order    d[t] = (c[t+1] - c[t-1]) / 2
//   second order   a[t] = (d[t+1] - d[t-1]) / 2 = (c[t+2] - 2 c[t] + c[t-2]) / 4
// as elements 0..12, 13..25 and 26..38. The first vector appears after the
// fifth static vector, so an utterance loses two frames at each end.
// restart empties the history. One register stage; registers advance only
// when ce is high.
// The document specifies first- and second-order differences concatenated
// into 39 dimensions; the difference formulas are this design's choice.
module fe_deltas
  import asr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        restart,
  input  logic        s_valid,
  output logic        s_ready,
  input  static_vec_t s_vec,
  output logic        o_valid,
  input  logic        o_ready,
  output feat_vec_t   o_vec
);
  static_vec_t h [4];      // h[0] = newest previous ... h[3] = oldest
  logic [2:0] fill;

  function automatic feat_t sat(input logic signed [19:0] v);
    if (v > 20'sd32767) return 16'sh7fff;
    if (v < -20'sd32768) return 16'sh8000;
    return 16'(v);
  endfunction

  assign s_ready = !o_valid || o_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0; o_vec <= '0; fill <= '0;
      for (int i = 0; i < 4; i++) h[i] <= '0;
    end else if (ce) begin
      if (restart) begin
        o_valid <= 1'b0; fill <= '0;
      end else if (s_valid && s_ready) begin
        h[0] <= s_vec; h[1] <= h[0]; h[2] <= h[1]; h[3] <= h[2];
        if (fill != 3'd4) fill <= fill + 1'b1;
        o_valid <= (fill == 3'd4);
        for (int d = 0; d < N_STATIC; d++) begin
          // c[t+2] = s_vec, c[t+1] = h[0], c[t] = h[1], c[t-1] = h[2], c[t-2] = h[3]
          o_vec[d]                <= h[1][d];
          o_vec[N_STATIC + d]     <= sat((20'(h[0][d]) - 20'(h[2][d])) >>> 1);
          o_vec[2 * N_STATIC + d] <= sat((20'(s_vec[d]) - 20'(h[1][d]) - 20'(h[1][d])
                                          + 20'(h[3][d])) >>> 2);
        end
      end else if (o_ready) o_valid <= 1'b0;
    end
  end
endmodule
