// sync_fifo: single-clock first-in first-out buffer.
//
// Used as the feature vector buffer between the front-end and the search
// (so the search can absorb varying per-frame workloads at a fixed clock)
// and for the request/response queues of the arc fetch and GMM units.
// Valid/ready handshake on both sides: a word is written when in_valid &&
// in_ready and read when out_valid && out_ready. Output is first-word
// fall-through (out_data shows the head while out_valid is high).
// Depth must be a power of two; the depth is this design's choice.
module sync_fifo #(
  parameter int WIDTH = 624,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;
  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end
  always_ff @(posedge clk) if (push) mem[wp] <= in_data;
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
endmodule
