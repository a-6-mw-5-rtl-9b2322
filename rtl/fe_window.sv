// fe_window: splits the 16 kHz audio stream into overlapping frames and
// applies the analysis window.
//
// Samples are written into a 512-entry circular buffer. Whenever FRAME_LEN
// (400 = 25 ms) samples are available from the current frame start, the
// frame is emitted as 512 values: FRAME_LEN windowed samples followed by
// zeros up to the FFT length. The frame start then advances by HOP (160 =
// 10 ms). The window is a Hamming window, 0.54 - 0.46 cos(2 pi n/(N-1)),
// held in a ROM of Q15 coefficients computed at elaboration. While a frame
// is emitted, new samples are accepted as long as they do not overwrite it.
// All registers advance only when ce is high (front-end clock enable).
// Frame length, hop and 512-point transform follow the front-end
// description; the Hamming shape is this design's choice.
// Interface: s_valid/s_ready audio input (accepted when ce && s_valid &&
// s_ready); o_valid/o_ready/o_data output with o_last on value 511.
module fe_window #(
  parameter int FRAME_LEN = 400,
  parameter int HOP       = 160,
  parameter int NFFT      = 512
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic               restart,
  input  logic               s_valid,
  output logic               s_ready,
  input  logic signed [15:0] s_data,
  output logic               o_valid,
  input  logic               o_ready,
  output logic signed [15:0] o_data,
  output logic               o_last
);
  localparam int AW = $clog2(NFFT);
  typedef logic [15:0] win_t [FRAME_LEN];
  function automatic win_t gen_win();
    win_t r;
    for (int n = 0; n < FRAME_LEN; n++)
      r[n] = 16'($rtoi(32767.0 * (0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * real'(n) /
                                                        real'(FRAME_LEN - 1))) + 0.5));
    return r;
  endfunction
  localparam win_t WIN = gen_win();

  logic signed [15:0] buffer [NFFT];
  logic [AW:0] wp, fs;            // write pointer, frame start (one wrap bit)
  logic [AW:0] avail;
  logic emitting;
  logic [AW-1:0] n;

  assign avail   = wp - fs;
  assign s_ready = (avail < (AW+1)'(NFFT));
  assign o_valid = emitting;
  assign o_last  = emitting && (n == AW'(NFFT - 1));
  always_comb begin
    logic signed [31:0] prod;
    prod = 32'(buffer[AW'(fs[AW-1:0] + n)]) * $signed({1'b0, WIN[(int'(n) < FRAME_LEN) ? int'(n) : 0]});
    o_data = (int'(n) < FRAME_LEN) ? 16'(prod >>> 15) : 16'sd0;
  end

  always_ff @(posedge clk) if (ce && s_valid && s_ready) buffer[wp[AW-1:0]] <= s_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; fs <= '0; emitting <= 1'b0; n <= '0;
    end else if (ce) begin
      if (restart) begin
        wp <= '0; fs <= '0; emitting <= 1'b0; n <= '0;
      end else begin
        if (s_valid && s_ready) wp <= wp + 1'b1;
        if (!emitting) begin
          if (avail >= (AW+1)'(FRAME_LEN)) begin emitting <= 1'b1; n <= '0; end
        end else if (o_ready) begin
          n <= n + 1'b1;
          if (n == AW'(NFFT - 1)) begin
            emitting <= 1'b0;
            fs <= fs + (AW+1)'(HOP);
          end
        end
      end
    end
  end
endmodule
