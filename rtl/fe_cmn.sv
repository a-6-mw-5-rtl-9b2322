// fe_cmn: cepstral mean normalization.
//
// Subtracts a running mean from each of the 13 static features. The
// 10-second moving average is approximated by an exponential average with
// time constant 2^ALPHA_SHIFT frames (1024 frames, about 10 s at 100
// frames/s): mean += (x - mean) / 2^ALPHA_SHIFT after each frame, with
// ALPHA_SHIFT extra fraction bits kept in the mean registers. The output
// is x minus the mean before the update. restart clears the means.
// One register stage; registers advance only when ce is high.
// The document specifies subtraction of a 10 s moving average; the
// exponential form is this design's choice.
module fe_cmn
  import asr_pkg::*;
#(
  parameter int ALPHA_SHIFT = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        restart,
  input  logic        s_valid,
  output logic        s_ready,
  input  static_vec_t s_vec,
  output logic        o_valid,
  input  logic        o_ready,
  output static_vec_t o_vec
);
  localparam int MW = 16 + ALPHA_SHIFT + 2;
  logic signed [MW-1:0] mean [N_STATIC];

  logic signed [MW-1:0] diff [N_STATIC];
  feat_t                y    [N_STATIC];
  always_comb
    for (int d = 0; d < N_STATIC; d++) begin
      logic signed [17:0] yw;
      diff[d] = (MW'(s_vec[d]) <<< ALPHA_SHIFT) - mean[d];
      yw = 18'(diff[d] >>> ALPHA_SHIFT);
      y[d] = (yw > 18'sd32767) ? 16'sh7fff : (yw < -18'sd32768) ? 16'sh8000 : 16'(yw);
    end

  assign s_ready = !o_valid || o_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0; o_vec <= '0;
      for (int d = 0; d < N_STATIC; d++) mean[d] <= '0;
    end else if (ce) begin
      if (restart) begin
        o_valid <= 1'b0;
        for (int d = 0; d < N_STATIC; d++) mean[d] <= '0;
      end else if (s_valid && s_ready) begin
        o_valid <= 1'b1;
        for (int d = 0; d < N_STATIC; d++) begin
          mean[d]  <= mean[d] + (diff[d] >>> ALPHA_SHIFT);
          o_vec[d] <= y[d];
        end
      end else if (o_ready) o_valid <= 1'b0;
    end
  end
endmodule
