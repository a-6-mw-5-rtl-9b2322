// frontend: MFCC feature extraction, audio samples in, 39-dimensional
// feature vectors out.
//
// Chain: fe_window (25 ms frames every 10 ms, window, zero pad to 512) ->
// fe_fft (real 512-point FFT via 256-point complex FFT, power spectrum) ->
// fe_filterbank (26 mel bands, two multipliers, plus total power) ->
// fe_log -> fe_dct (12 cepstra + log power) -> fe_cmn (mean
// normalization) -> fe_deltas (first and second differences, 39 values).
// Every stage uses valid/ready handshakes and advances only on the
// front-end clock enable ce (decoder clock / 16). The input handshake
// completes when ce && s_valid && s_ready (s_ready already includes ce);
// likewise a feature vector is taken when ce && o_valid && o_ready.
// Per frame the chain needs about 512 + 1024 + 257 + 257 + 27 + 312 enabled
// cycles, below the 160 samples x 39 cycles available at the minimum
// front-end clock of 625 kHz.
// Following the document (Fig. 3): the order of the stages, the
// divided front-end clock and the 625 kHz real-time figure. This design's:
// the handshakes and every fixed-point format between stages.
module frontend
  import asr_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic               restart,
  input  logic               s_valid,
  output logic               s_ready,
  input  logic signed [15:0] s_data,
  output logic               o_valid,
  input  logic               o_ready,
  output feat_vec_t          o_vec
);
  logic w_v, w_r, w_l; logic signed [15:0] w_d;
  logic f_v, f_r, f_l; logic [47:0] f_p;
  logic b_v, b_r, b_l; logic [63:0] b_d;
  logic l_v, l_r, l_l; feat_t l_d;
  logic d_v, d_r; static_vec_t d_vec;
  logic c_v, c_r; static_vec_t c_vec;
  logic win_ready;

  assign s_ready = win_ready && ce;

  fe_window u_win (.clk, .rst_n, .ce, .restart, .s_valid, .s_ready(win_ready), .s_data,
                   .o_valid(w_v), .o_ready(w_r), .o_data(w_d), .o_last(w_l));
  fe_fft u_fft (.clk, .rst_n, .ce, .s_valid(w_v), .s_ready(w_r), .s_data(w_d),
                .o_valid(f_v), .o_ready(f_r), .o_power(f_p), .o_last(f_l));
  fe_filterbank u_fb (.clk, .rst_n, .ce, .s_valid(f_v), .s_ready(f_r), .s_power(f_p),
                      .s_last(f_l), .o_valid(b_v), .o_ready(b_r), .o_data(b_d), .o_last(b_l));
  fe_log u_log (.clk, .rst_n, .ce, .s_valid(b_v), .s_ready(b_r), .s_data(b_d), .s_last(b_l),
                .o_valid(l_v), .o_ready(l_r), .o_data(l_d), .o_last(l_l));
  fe_dct u_dct (.clk, .rst_n, .ce, .s_valid(l_v), .s_ready(l_r), .s_data(l_d), .s_last(l_l),
                .o_valid(d_v), .o_ready(d_r), .o_vec(d_vec));
  fe_cmn u_cmn (.clk, .rst_n, .ce, .restart, .s_valid(d_v), .s_ready(d_r), .s_vec(d_vec),
                .o_valid(c_v), .o_ready(c_r), .o_vec(c_vec));
  fe_deltas u_dl (.clk, .rst_n, .ce, .restart, .s_valid(c_v), .s_ready(c_r), .s_vec(c_vec),
                  .o_valid, .o_ready, .o_vec);
endmodule
