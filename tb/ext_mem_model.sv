// ext_mem_model: behavioural model of the external model memory (flash or
// DRAM) for testbenches. Not synthesizable.
//
// 32-bit words addressed by word address, stored sparsely; unwritten words
// read as 0. Accepts a request when req_ready is high (ready is withheld on
// random cycles when STALL is set); read data returns in request order
// LAT cycles later, at most one word per cycle. The testbench fills the
// memory with poke() and inspects it with peek(). Requests are ignored
// while rst_n is low.
// The document places the models in an off-chip flash or DRAM; this model's
// latency, stall pattern and word width are this design's choices.
module ext_mem_model #(
  parameter int LAT   = 3,
  parameter bit STALL = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [31:0] req_addr,
  input  logic [31:0] req_wdata,
  output logic        rsp_valid,
  output logic [31:0] rsp_data
);
  logic [31:0] mem [logic [31:0]];
  logic [31:0] q_data [$];
  longint      q_due [$];
  longint      cyc = 0;
  int          reads = 0, writes = 0;

  function automatic void poke(input logic [31:0] a, input logic [31:0] d);
    mem[a] = d;
  endfunction
  function automatic logic [31:0] peek(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : 32'd0;
  endfunction

  initial begin req_ready = 1'b1; rsp_valid = 1'b0; rsp_data = '0; end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && req_valid && req_ready) begin
      if (req_we) begin mem[req_addr] = req_wdata; writes++; end
      else begin
        q_data.push_back(peek(req_addr));
        q_due.push_back(cyc + LAT);
        reads++;
      end
    end
    rsp_valid <= 1'b0;
    if (q_due.size() > 0 && q_due[0] <= cyc) begin
      rsp_valid <= 1'b1;
      rsp_data  <= q_data.pop_front();
      void'(q_due.pop_front());
    end
    req_ready <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
  end
endmodule
