// mem_arbiter: shares one external-memory port among N_CLI clients.
//
// Requests are granted round-robin, one per cycle when the memory accepts
// (mem_req_ready). For every granted read the client number is pushed into
// a tag queue; since the memory returns read data in request order, each
// returning word is routed to the client at the head of the queue. Writes
// return nothing. Requests stall while the tag queue is full.
// Client request ports: cli_req_valid/cli_req_ready handshake with the
// request struct {we, addr, wdata}; responses: cli_rsp_valid[i] with the
// shared cli_rsp_data. The arbitration policy and tag depth are this
// design's choices; the document only says the control logic handles the
// external memory.
module mem_arbiter
  import asr_pkg::*;
#(
  parameter int N_CLI = 4,
  parameter int TAGS  = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     [N_CLI-1:0] cli_req_valid,
  output logic     [N_CLI-1:0] cli_req_ready,
  input  mem_req_t cli_req [N_CLI],
  output logic     [N_CLI-1:0] cli_rsp_valid,
  output word_t    cli_rsp_data,
  output logic     mem_req_valid,
  input  logic     mem_req_ready,
  output mem_req_t mem_req,
  input  logic     mem_rsp_valid,
  input  word_t    mem_rsp_data
);
  localparam int CW = (N_CLI > 1) ? $clog2(N_CLI) : 1;
  logic [CW-1:0] rr, gnt;
  logic any;
  logic tag_ready, tag_valid;
  logic [CW-1:0] tag_head;

  always_comb begin
    any = 1'b0; gnt = '0;
    for (int k = 0; k < N_CLI; k++) begin
      if (!any && cli_req_valid[(int'(rr) + k) % N_CLI]) begin
        any = 1'b1;
        gnt = CW'((int'(rr) + k) % N_CLI);
      end
    end
  end
  wire gnt_read = !cli_req[gnt].we;
  assign mem_req_valid = any && (tag_ready || !gnt_read);
  assign mem_req = cli_req[gnt];
  always_comb begin
    cli_req_ready = '0;
    cli_req_ready[gnt] = any && mem_req_ready && (tag_ready || !gnt_read);
  end
  wire fire = mem_req_valid && mem_req_ready;

  sync_fifo #(.WIDTH(CW), .DEPTH(TAGS)) u_tags (
    .clk, .rst_n, .in_valid(fire && gnt_read), .in_ready(tag_ready), .in_data(gnt),
    .out_valid(tag_valid), .out_ready(mem_rsp_valid), .out_data(tag_head), .count());

  always_comb begin
    cli_rsp_valid = '0;
    cli_rsp_valid[tag_head] = mem_rsp_valid && tag_valid;
  end
  assign cli_rsp_data = mem_rsp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (fire) rr <= (int'(gnt) == N_CLI - 1) ? '0 : gnt + 1'b1;
  end

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n) mem_rsp_valid |-> tag_valid);
endmodule
