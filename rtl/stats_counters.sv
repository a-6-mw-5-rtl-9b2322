// stats_counters: statistics registers for the host.
//
// Counts N_EV event inputs (one per cycle each). At frame_end the counts
// of the frame just finished are copied to the per-frame registers and the
// frame counters restart; the per-utterance totals accumulate until
// utt_start clears everything. The host reads any register through sel:
// sel < N_EV gives the per-frame value of event sel, sel in [N_EV, 2*N_EV)
// the utterance total. The kinds of statistics (active states, states
// expanded, WFST and GMM memory traffic) follow the control description;
// the register map is this design's choice.
module stats_counters #(
  parameter int N_EV = 12,
  parameter int W    = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            utt_start,
  input  logic            frame_end,
  input  logic [N_EV-1:0] ev,
  input  logic [7:0]      sel,
  output logic [W-1:0]    value
);
  logic [W-1:0] cur [N_EV];
  logic [W-1:0] last [N_EV];
  logic [W-1:0] tot [N_EV];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_EV; i++) begin cur[i] <= '0; last[i] <= '0; tot[i] <= '0; end
    end else if (utt_start) begin
      for (int i = 0; i < N_EV; i++) begin cur[i] <= '0; last[i] <= '0; tot[i] <= '0; end
    end else begin
      for (int i = 0; i < N_EV; i++) begin
        if (frame_end) begin
          last[i] <= cur[i] + W'(ev[i]);
          cur[i]  <= '0;
        end else cur[i] <= cur[i] + W'(ev[i]);
        tot[i] <= tot[i] + W'(ev[i]);
      end
    end
  end
  always_comb begin
    if (int'(sel) < N_EV) value = last[int'(sel)];
    else if (int'(sel) < 2 * N_EV) value = tot[int'(sel) - N_EV];
    else value = '0;
  end
endmodule
