// fe_log: natural logarithm of the band energies.
//
// For an unsigned 64-bit input x with leading one at bit e, log2(x) is
// e + log2(1.f) where f are the next 6 bits; log2(1.f) comes from a 64-entry
// ROM (Q8, computed at elaboration). The result is converted to the natural
// log by multiplying with ln 2 (Q16 constant 45426), giving a signed 16-bit
// value in Q8 (1/256 nat). x = 0 gives 0 (as for x = 1).
// Streams one value per enabled cycle with one register stage:
// s_valid/s_ready/s_data/s_last in, o_valid/o_ready/o_data/o_last out.
// The document places a log with a ROM after the filter bank; the
// ROM size and formats are this design's choices.
module fe_log (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic               s_valid,
  output logic               s_ready,
  input  logic [63:0]        s_data,
  input  logic               s_last,
  output logic               o_valid,
  input  logic               o_ready,
  output logic signed [15:0] o_data,
  output logic               o_last
);
  typedef logic [7:0] rom_t [64];
  function automatic rom_t gen_rom();
    rom_t r;
    for (int i = 0; i < 64; i++)
      r[i] = 8'($rtoi(256.0 * $ln(1.0 + real'(i) / 64.0) / $ln(2.0) + 0.5));
    return r;
  endfunction
  localparam rom_t ROM = gen_rom();

  logic [5:0] e;
  logic [5:0] f;
  logic [15:0] l2;        // log2 in Q8
  logic [31:0] ln_q8;
  always_comb begin
    logic [63:0] norm;
    e = '0;
    for (int b = 0; b < 64; b++) if (s_data[b]) e = 6'(b);
    norm = s_data << (6'd63 - e);
    f = norm[62:57];
    l2 = {2'b00, e, 8'd0} + 16'(ROM[f]);
    ln_q8 = (32'(l2) * 32'd45426 + 32'd32768) >> 16;
  end

  assign s_ready = !o_valid || o_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0; o_data <= '0; o_last <= 1'b0;
    end else if (ce) begin
      if (s_valid && s_ready) begin
        o_valid <= 1'b1;
        o_data  <= 16'(ln_q8);
        o_last  <= s_last;
      end else if (o_ready) o_valid <= 1'b0;
    end
  end
endmodule
