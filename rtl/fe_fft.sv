// fe_fft: power spectrum of a real 512-point frame using a 256-point
// complex FFT.
//
// Decimation: consecutive real samples x[2m], x[2m+1] form the complex
// value z[m] = x[2m] + j x[2m+1], written at the bit-reversed address of m.
// An in-place radix-2 decimation-in-time FFT of N = 256 points then runs
// 8 stages of 128 butterflies, one butterfly per cycle (1024 cycles), with
// Q15 twiddles from a ROM and a 1/2 scaling per stage to avoid overflow.
// Warping: for k = 0..256, with A = Z[k], B = conj(Z[(256-k) mod 256]),
//   X[k] = (A + B)/2 - j W512^k (A - B)/2,   W512 = exp(-j 2 pi / 512)
// gives the spectrum of the 512 real samples (scaled by 1/256), and the
// output is the power |X[k]|^2 as an unsigned 48-bit value.
// All registers advance only when ce is high.
// Follows the real-valued FFT structure of the front-end (decimation,
// 256-point FFT, warping). One in-place 256-word memory with two read and
// two write ports stands in for the pair of RAMs; the data widths and
// scaling are this design's choices.
// Interface: 512 inputs on s_valid/s_ready/s_data, then
// 257 outputs on o_valid/o_ready/o_power with o_last on k = 256.
// Latency per frame: 512 input + 1024 compute + 257 output enabled cycles.
module fe_fft #(
  parameter int DW = 24
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic               s_valid,
  output logic               s_ready,
  input  logic signed [15:0] s_data,
  output logic               o_valid,
  input  logic               o_ready,
  output logic [47:0]        o_power,
  output logic               o_last
);
  localparam int N = 256;
  typedef logic signed [15:0] tw_t [N+1];
  function automatic tw_t gen_tw(input bit sine, input int len);
    tw_t r;
    for (int k = 0; k <= N; k++) begin
      real ph, v;
      ph = 2.0 * 3.14159265358979 * real'(k) / real'(len);
      v  = sine ? -$sin(ph) : $cos(ph);
      r[k] = 16'($rtoi(v * 32767.0 + ((v >= 0.0) ? 0.5 : -0.5)));
    end
    return r;
  endfunction
  localparam tw_t C256 = gen_tw(1'b0, 256);   // cos(2 pi k/256)
  localparam tw_t S256 = gen_tw(1'b1, 256);   // -sin(2 pi k/256)
  localparam tw_t C512 = gen_tw(1'b0, 512);
  localparam tw_t S512 = gen_tw(1'b1, 512);

  logic signed [DW-1:0] zr [N];
  logic signed [DW-1:0] zi [N];

  typedef enum logic [1:0] {S_LOAD, S_COMP, S_OUT} st_t;
  st_t st;
  logic [8:0] cnt;           // input sample count / output index
  logic [2:0] stage;
  logic [6:0] bfly;
  logic signed [15:0] even;

  function automatic logic [7:0] bitrev(input logic [7:0] v);
    for (int b = 0; b < 8; b++) bitrev[b] = v[7-b];
  endfunction

  // butterfly addressing
  logic [7:0] i0, i1, half, tw_idx;
  always_comb begin
    half = 8'(1 << stage);
    i0 = 8'(((16'(bfly) >> stage) << (stage + 1)) | (16'(bfly) & (16'(half) - 16'd1)));
    i1 = i0 + half;
    tw_idx = 8'((16'(bfly) & (16'(half) - 16'd1)) << (3'd7 - stage));
  end
  logic signed [DW+16:0] tr, ti;
  logic signed [DW:0] ar, ai, br, bi;
  always_comb begin
    tr = (DW+17)'(zr[i1] * C256[9'(tw_idx)]) - (DW+17)'(zi[i1] * S256[9'(tw_idx)]);
    ti = (DW+17)'(zr[i1] * S256[9'(tw_idx)]) + (DW+17)'(zi[i1] * C256[9'(tw_idx)]);
    ar = (DW+1)'(zr[i0]) + (DW+1)'(tr >>> 15);
    ai = (DW+1)'(zi[i0]) + (DW+1)'(ti >>> 15);
    br = (DW+1)'(zr[i0]) - (DW+1)'(tr >>> 15);
    bi = (DW+1)'(zi[i0]) - (DW+1)'(ti >>> 15);
  end

  // warping
  logic [7:0] ka, kb;
  logic signed [DW+1:0] sr, si, dr, di;    // A+B, A-B
  logic signed [DW+18:0] wr, wi;
  logic signed [DW+2:0] xr, xi;
  always_comb begin
    ka = cnt[7:0];
    kb = 8'(9'd256 - cnt);
    // A = Z[ka], B = conj(Z[kb])
    sr = (DW+2)'(zr[ka]) + (DW+2)'(zr[kb]);
    si = (DW+2)'(zi[ka]) - (DW+2)'(zi[kb]);
    dr = (DW+2)'(zr[ka]) - (DW+2)'(zr[kb]);
    di = (DW+2)'(zi[ka]) + (DW+2)'(zi[kb]);
    // -j * W * D, W = c + j s  ->  -j (c dr - s di + j (c di + s dr))
    //                           = (c di + s dr) - j (c dr - s di)
    wr = (DW+19)'(di * C512[cnt]) + (DW+19)'(dr * S512[cnt]);
    wi = -((DW+19)'(dr * C512[cnt]) - (DW+19)'(di * S512[cnt]));
    xr = (DW+3)'((sr + (DW+2)'(wr >>> 15)) >>> 1);
    xi = (DW+3)'((si + (DW+2)'(wi >>> 15)) >>> 1);
  end
  logic [2*DW+5:0] pw;
  always_comb begin
    pw = (2*DW+6)'(xr * xr) + (2*DW+6)'(xi * xi);
    o_power = (pw > (2*DW+6)'(48'hffff_ffff_ffff)) ? 48'hffff_ffff_ffff : 48'(pw);
  end

  assign s_ready = (st == S_LOAD);
  assign o_valid = (st == S_OUT);
  assign o_last  = (st == S_OUT) && (cnt == 9'd256);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_LOAD; cnt <= '0; stage <= '0; bfly <= '0; even <= '0;
    end else if (ce) begin
      case (st)
        S_LOAD: if (s_valid) begin
          if (!cnt[0]) even <= s_data;
          else begin
            zr[bitrev(cnt[8:1])] <= (DW)'(even) <<< 6;
            zi[bitrev(cnt[8:1])] <= (DW)'(s_data) <<< 6;
          end
          cnt <= cnt + 1'b1;
          if (cnt == 9'd511) begin st <= S_COMP; stage <= '0; bfly <= '0; cnt <= '0; end
        end
        S_COMP: begin
          zr[i0] <= DW'(ar >>> 1); zi[i0] <= DW'(ai >>> 1);
          zr[i1] <= DW'(br >>> 1); zi[i1] <= DW'(bi >>> 1);
          bfly <= bfly + 1'b1;
          if (bfly == 7'd127) begin
            stage <= stage + 1'b1;
            if (stage == 3'd7) begin st <= S_OUT; cnt <= '0; end
          end
        end
        S_OUT: if (o_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == 9'd256) begin st <= S_LOAD; cnt <= '0; end
        end
        default: st <= S_LOAD;
      endcase
    end
  end
endmodule
