// fe_clk_div: divide-by-DIV enable for the front-end.
//
// The decoder clock is divided by 16 for the less demanding front-end. Here
// the division is a one-cycle enable pulse every DIV cycles that all
// front-end registers use as clock enable, so the front-end runs at
// f_clk/DIV without a second clock tree or clock-domain crossing (this
// design's choice). ce is high in the last cycle of each DIV-cycle period.
module fe_clk_div #(
  parameter int DIV = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic ce
);
  logic [$clog2(DIV)-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (int'(cnt) == DIV - 1) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end
  assign ce = (int'(cnt) == DIV - 1);
endmodule
