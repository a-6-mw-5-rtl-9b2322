// fe_filterbank: mel-scale triangular band-pass filter bank with two shared
// multipliers.
//
// Each FFT bin k (0..256) lies on the falling edge of at most one band and
// the rising edge of the next, so it contributes p*w to band c and
// p*(1-w) to band c+1. A ROM, computed at elaboration, gives for every bin
// the band c and the weight w (Q15); two multipliers form the two products
// and a multiplexer adds them into the two active accumulators out of
// N_BANDS. Band centres are equally spaced on the mel scale
// mel(f) = 1127 ln(1 + f/700) between 0 Hz and FS/2, as in common HTK
// practice. A 27th output is the total power of the frame (sum over bins),
// used as the log-power feature.
// After bin 256 the unit emits N_BANDS band energies followed by the total
// power on o_valid/o_ready/o_data (64-bit unsigned), o_last on the last.
// All registers advance only when ce is high.
// Following the document: 26 bands, two multipliers reused across bands.
// This design's: mel formula and edges, weight precision, the power
// output taken from this unit.
module fe_filterbank #(
  parameter int N_BANDS = 26,
  parameter int NBIN    = 257,
  parameter int FS      = 16000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        s_valid,
  output logic        s_ready,
  input  logic [47:0] s_power,
  input  logic        s_last,
  output logic        o_valid,
  input  logic        o_ready,
  output logic [63:0] o_data,
  output logic        o_last
);
  typedef logic [4:0]  ch_t [NBIN];
  typedef logic [15:0] wt_t [NBIN];
  function automatic real mel(input real f);
    return 1127.0 * $ln(1.0 + f / 700.0);
  endfunction
  // chan: band whose falling edge holds the bin (0 = none, bins below band 1)
  function automatic ch_t gen_ch();
    ch_t r;
    for (int k = 0; k < NBIN; k++) begin
      real m, step;
      int c;
      step = mel(real'(FS) / 2.0) / real'(N_BANDS + 1);
      m = mel(real'(k) * real'(FS) / real'(2 * (NBIN - 1)));
      c = $rtoi(m / step);           // centre c*step <= m < (c+1)*step
      if (c > N_BANDS) c = N_BANDS;
      r[k] = 5'(c);
    end
    return r;
  endfunction
  function automatic wt_t gen_wt();
    wt_t r;
    for (int k = 0; k < NBIN; k++) begin
      real m, step, frac;
      int c;
      step = mel(real'(FS) / 2.0) / real'(N_BANDS + 1);
      m = mel(real'(k) * real'(FS) / real'(2 * (NBIN - 1)));
      c = $rtoi(m / step);
      frac = m / step - real'(c);    // position between centre c and c+1
      if (c > N_BANDS) frac = 1.0;
      r[k] = 16'($rtoi((1.0 - frac) * 32768.0 + 0.5));   // weight of band c
    end
    return r;
  endfunction
  localparam ch_t CH = gen_ch();
  localparam wt_t WT = gen_wt();

  logic [63:0] acc [N_BANDS+2];     // index 0 and N_BANDS+1 collect out-of-range parts
  logic [63:0] total;
  logic [8:0]  k;
  logic        out_phase;
  logic [4:0]  oi;

  logic [63:0] p_lo, p_hi;           // the two multipliers
  logic [4:0]  c;
  always_comb begin
    c = CH[k];
    p_lo = (64'(s_power) * 64'(WT[k])) >> 15;
    p_hi = (64'(s_power) * (64'd32768 - 64'(WT[k]))) >> 15;
  end

  assign s_ready = !out_phase;
  assign o_valid = out_phase;
  assign o_data  = (int'(oi) == N_BANDS) ? total : acc[int'(oi) + 1];
  assign o_last  = out_phase && (int'(oi) == N_BANDS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k <= '0; out_phase <= 1'b0; oi <= '0; total <= '0;
      for (int b = 0; b < N_BANDS + 2; b++) acc[b] <= '0;
    end else if (ce) begin
      if (!out_phase) begin
        if (s_valid) begin
          acc[c]      <= acc[c] + p_lo;
          acc[c + 1'b1] <= acc[c + 1'b1] + p_hi;
          total <= total + 64'(s_power);
          k <= k + 1'b1;
          if (s_last) begin out_phase <= 1'b1; oi <= '0; end
        end
      end else if (o_ready) begin
        oi <= oi + 1'b1;
        if (int'(oi) == N_BANDS) begin
          out_phase <= 1'b0; k <= '0; total <= '0;
          for (int b = 0; b < N_BANDS + 2; b++) acc[b] <= '0;
        end
      end
    end
  end
endmodule
