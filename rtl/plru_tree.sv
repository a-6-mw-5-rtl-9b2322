// plru_tree: tree pseudo-least-recently-used replacement for a fully
// associative store of WAYS entries.
//
// WAYS-1 tree bits form a binary tree; each bit points toward the half that
// was used less recently (0 = left, 1 = right). victim follows the bits from
// the root. touch_valid marks way touch_way as most recently used by setting
// every bit on its path to point away from it. One touch per cycle; victim
// is combinational from the tree state. The algorithm choice (PLRU) and the
// 4096-way size follow the arc cache description; the bit encoding is this
// design's choice.
module plru_tree #(
  parameter int WAYS = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     touch_valid,
  input  logic [$clog2(WAYS)-1:0]  touch_way,
  output logic [$clog2(WAYS)-1:0]  victim
);
  localparam int LV = $clog2(WAYS);
  logic [WAYS-1:0] tree;   // node n at index n (1..WAYS-1), index 0 unused

  always_comb begin
    int unsigned n;
    n = 1;
    for (int l = 0; l < LV; l++) n = 2 * n + int'(tree[n]);
    victim = LV'(n - WAYS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tree <= '0;
    else if (touch_valid) begin
      for (int l = 0; l < LV; l++) begin
        // node on level l above the touched leaf, and the direction taken
        tree[(WAYS + int'(touch_way)) >> (LV - l)] <= ~touch_way[LV-1-l];
      end
    end
  end
endmodule
