// beam_ctrl: beam pruning with feedback control of the beam width.
//
// Each incoming arc score is accepted when it exceeds the pruning threshold
// (highest score of the previous frame minus the beam width). The highest
// score seen in the current frame is tracked per arc and moved to the
// previous-frame register on new_frame. The beam width is adjusted on every
// arc: the proportion of arcs accepted so far in this frame,
// N_accepted/N_processed, is compared with the proportion needed to reach the
// target list size, N_target/N_expected, where N_expected is the sum of the
// outgoing-arc counts of the destination states accepted in the previous
// frame. error = N_target/N_expected - N_accepted/N_processed (both ratios
// in Q16); beam += (gain * error) >>> GAIN_SHIFT, clamped to
// [beam_min, beam_max]. gain = 0 gives a fixed beam.
// The structure (max register, frame register, subtract, compare, error,
// gain multiply, accumulate register) follows the feedback controller of
// the architecture; the ratio arithmetic, the sign convention and the
// fixed-point formats are this design's choices.
// Timing: accept is combinational from arc_score; all registers update on
// the clock edge where arc_valid is high.
module beam_ctrl
  import asr_pkg::*;
#(
  parameter int CNT_W      = 24,
  parameter int GAIN_SHIFT = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        new_frame,       // start of a frame (pulse)
  input  score_t      beam_init,       // loaded at utterance start
  input  logic        utt_start,
  input  logic [15:0] gain,
  input  score_t      beam_min,
  input  score_t      beam_max,
  input  logic [CNT_W-1:0] n_target,
  input  logic        arc_valid,       // an arc is being tested
  input  score_t      arc_score,
  input  logic [15:0] arc_dest_narcs,
  output logic        accept,
  output score_t      beam,
  output score_t      best_prev,
  output score_t      threshold,
  output logic [CNT_W-1:0] n_expected  // expectation used in this frame
);
  score_t best_cur;
  logic [CNT_W-1:0] n_proc, n_acc, n_exp_next;

  assign threshold = sat_score(64'(best_prev) - 64'(beam));
  assign accept    = arc_score > threshold;

  // Q16 ratios; an empty denominator counts as ratio 1.
  logic [CNT_W+16:0] r_acc, r_tgt;
  logic signed [CNT_W+18:0] err;
  logic signed [CNT_W+36:0] step;
  logic signed [63:0] beam_next;
  logic [CNT_W-1:0] n_proc1, n_acc1;
  always_comb begin
    n_proc1 = n_proc + 1'b1;
    n_acc1  = n_acc + CNT_W'(accept);
    r_acc = ((CNT_W+17)'(n_acc1) << 16) / (CNT_W+17)'(n_proc1);
    r_tgt = (n_expected == '0) ? (CNT_W+17)'(1 << 16)
          : ((CNT_W+17)'(n_target) << 16) / (CNT_W+17)'(n_expected);
    err  = $signed({2'b00, r_tgt}) - $signed({2'b00, r_acc});
    step = err * $signed({1'b0, gain});
    beam_next = 64'(beam) + 64'(step >>> GAIN_SHIFT);
    if (beam_next < 64'(beam_min)) beam_next = 64'(beam_min);
    if (beam_next > 64'(beam_max)) beam_next = 64'(beam_max);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_cur <= SCORE_MIN; best_prev <= SCORE_MIN; beam <= '0;
      n_proc <= '0; n_acc <= '0; n_expected <= '0; n_exp_next <= '0;
    end else if (utt_start) begin
      best_cur <= SCORE_MIN; best_prev <= 32'sd0; beam <= beam_init;
      n_proc <= '0; n_acc <= '0; n_expected <= '0; n_exp_next <= '0;
    end else if (new_frame) begin
      best_prev  <= best_cur;
      best_cur   <= SCORE_MIN;
      n_proc     <= '0;
      n_acc      <= '0;
      n_expected <= n_exp_next;
      n_exp_next <= '0;
    end else if (arc_valid) begin
      if (arc_score > best_cur) best_cur <= arc_score;
      n_proc <= n_proc1;
      n_acc  <= n_acc1;
      if (accept) n_exp_next <= n_exp_next + CNT_W'(arc_dest_narcs);
      beam <= score_t'(beam_next);
    end
  end

  a_beam_clamped: assert property (@(posedge clk) disable iff (!rst_n || utt_start)
    arc_valid |=> (beam >= beam_min && beam <= beam_max));
endmodule
