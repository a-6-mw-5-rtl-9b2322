// tb_mem_arbiter: three clients issue random reads and writes through the
// arbiter to a stalling memory model. Each client must get back exactly
// the words of its own reads, in order; writes must land; and every
// client must be granted (no starvation).
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_mem_arbiter;
  import asr_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic [N-1:0] cli_req_valid, cli_req_ready, cli_rsp_valid;
  mem_req_t cli_req [N];
  word_t cli_rsp_data;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req; word_t mem_rsp_data;
  int checks = 0, failures = 0;
  int grants [N];
  mem_arbiter #(.N_CLI(N)) dut (.*);
  ext_mem_model #(.LAT(5), .STALL(1'b1)) mem (.clk, .rst_n, .req_valid(mem_req_valid),
    .req_ready(mem_req_ready), .req_we(mem_req.we), .req_addr(mem_req.addr),
    .req_wdata(mem_req.wdata), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));
  word_t expq [N][$];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < N; c++) begin
      if (cli_req_valid[c] && cli_req_ready[c]) begin
        grants[c]++;
        if (!cli_req[c].we) expq[c].push_back(cli_req[c].addr ^ 32'h5a5a0000);
      end
      if (cli_rsp_valid[c]) begin
        checks++;
        if (expq[c].size() == 0 || cli_rsp_data != expq[c][0]) begin
          failures++; $display("FAIL client %0d data %h", c, cli_rsp_data);
        end
        if (expq[c].size() > 0) void'(expq[c].pop_front());
      end
    end
  end
  initial begin
    for (int a = 0; a < 256; a++) mem.poke(a, a ^ 32'h5a5a0000);
    cli_req_valid = '0;
    for (int c = 0; c < N; c++) cli_req[c] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int c = 0; c < N; c++)
        if (!cli_req_valid[c] || cli_req_ready[c]) begin
          cli_req_valid[c] = ($urandom_range(0, 2) != 0);
          cli_req[c] = '{we: 1'b0, addr: 32'($urandom_range(0, 255)), wdata: '0};
          if (c == 2 && $urandom_range(0, 3) == 0)
            cli_req[c] = '{we: 1'b1, addr: 32'(1000 + t), wdata: 32'(t)};
        end
      @(posedge clk);
    end
    @(negedge clk); cli_req_valid = '0;
    repeat (40) @(posedge clk);
    for (int c = 0; c < N; c++) begin
      checks++;
      if (grants[c] < 300 || expq[c].size() != 0) begin failures++; $display("FAIL client %0d grants %0d", c, grants[c]); end
    end
    checks++;
    if (mem.writes == 0) begin failures++; $display("FAIL no writes"); end
    for (int t = 0; t < 2000; t++) if (mem.mem.exists(1000 + t)) begin
      checks++; if (mem.peek(1000 + t) != 32'(t)) begin failures++; $display("FAIL write %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
