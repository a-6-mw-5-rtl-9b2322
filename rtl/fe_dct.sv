// fe_dct: discrete cosine transform of the log filter-bank energies into
// cepstral coefficients.
//
// Collects N_BANDS log energies followed by the log power (27 values), then
// computes c_i = sqrt(2/N) * sum_j m_j cos(pi i (j + 0.5) / N), i = 1..N_CEP,
// with one multiply-accumulate per enabled cycle (N_CEP * N_BANDS cycles)
// and Q14 coefficients from a ROM computed at elaboration. The output
// vector holds c_1..c_12 in elements 0..11 and the log power in element 12
// (Q8 signed 16-bit, saturated).
// All registers advance only when ce is high.
// Following the document: DCT with a ROM, 12 cepstra plus log power.
// This design's: coefficient precision, scaling, sequential schedule.
// Interface: s_valid/s_ready/s_data/s_last stream in; o_valid/o_ready with
// the vector o_vec out.
module fe_dct
  import asr_pkg::*;
#(
  parameter int N_BANDS = 26,
  parameter int N_CEP   = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        s_valid,
  output logic        s_ready,
  input  feat_t       s_data,
  input  logic        s_last,
  output logic        o_valid,
  input  logic        o_ready,
  output static_vec_t o_vec
);
  typedef logic signed [15:0] cos_t [N_CEP * N_BANDS];
  function automatic cos_t gen_cos();
    cos_t r;
    for (int i = 0; i < N_CEP; i++)
      for (int j = 0; j < N_BANDS; j++) begin
        real v;
        v = $sqrt(2.0 / real'(N_BANDS)) *
            $cos(3.14159265358979 * real'(i + 1) * (real'(j) + 0.5) / real'(N_BANDS));
        r[i * N_BANDS + j] = 16'($rtoi(v * 16384.0 + ((v >= 0.0) ? 0.5 : -0.5)));
      end
    return r;
  endfunction
  localparam cos_t COS = gen_cos();

  feat_t m [N_BANDS + 1];
  typedef enum logic [1:0] {S_IN, S_MAC, S_OUT} st_t;
  st_t st;
  logic [4:0] jn;
  logic [4:0] ci;
  logic signed [39:0] acc;

  function automatic feat_t sat16(input logic signed [39:0] v);
    if (v > 40'sd32767) return 16'sh7fff;
    if (v < -40'sd32768) return 16'sh8000;
    return 16'(v);
  endfunction

  logic signed [39:0] prod;
  assign prod = 40'(m[jn] * COS[int'(ci) * N_BANDS + int'(jn)]);

  assign s_ready = (st == S_IN);
  assign o_valid = (st == S_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IN; jn <= '0; ci <= '0; acc <= '0; o_vec <= '0;
    end else if (ce) begin
      case (st)
        S_IN: if (s_valid) begin
          m[jn] <= s_data;
          jn <= jn + 1'b1;
          if (s_last) begin
            o_vec[N_CEP] <= s_data;
            st <= S_MAC; jn <= '0; ci <= '0; acc <= '0;
          end
        end
        S_MAC: begin
          if (int'(jn) == N_BANDS - 1) begin
            o_vec[ci] <= sat16((acc + prod) >>> 14);
            acc <= '0; jn <= '0;
            ci <= ci + 1'b1;
            if (int'(ci) == N_CEP - 1) st <= S_OUT;
          end else begin
            acc <= acc + prod;
            jn <= jn + 1'b1;
          end
        end
        S_OUT: if (o_ready) begin st <= S_IN; jn <= '0; end
        default: st <= S_IN;
      endcase
    end
  end
endmodule
