// tb_backtrace: builds per-frame snapshots of random lists in the memory
// model, picks a random best final state, follows the back-pointers in the
// testbench to get the expected word sequence and checks the unit emits
// the same non-zero labels, last word first, then signals done.
// The expected behaviour checked here follows the document's description of
// the block; the stimulus, reference models, tolerances and cycle bounds
// are this design's choices.
module tb_backtrace;
  import asr_pkg::*;
  localparam int CAP = 64;
  localparam addr_t SB = 32'h4000;
  logic clk = 0, rst_n;
  initial begin rst_n = 1'b1; #1 rst_n = 1'b0; end  // async reset edge
  always #5 clk = ~clk;
  logic start, mreq_valid, mreq_ready, mrsp_valid, word_valid, word_ready, done, busy;
  logic [15:0] nframes, word;
  logic [5:0] best_idx;
  addr_t snap_base;
  mem_req_t mreq; word_t mrsp_data;
  int checks = 0, failures = 0;
  backtrace #(.CAP(CAP)) dut (.*);
  ext_mem_model #(.LAT(2), .STALL(1'b1)) mem (.clk, .rst_n, .req_valid(mreq_valid),
    .req_ready(mreq_ready), .req_we(mreq.we), .req_addr(mreq.addr), .req_wdata(mreq.wdata),
    .rsp_valid(mrsp_valid), .rsp_data(mrsp_data));
  initial begin
    logic [15:0] exp_w [$];
    logic [15:0] got [$];
    int idx;
    start = 0; nframes = 0; best_idx = 0; snap_base = SB;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int trial = 0; trial < 5; trial++) begin
      int nf;
      nf = 10 + trial * 7;
      for (int f = 0; f < nf; f++)
        for (int e = 0; e < CAP; e++)
          mem.poke(SB + f * CAP + e, {($urandom_range(0, 3) == 0) ? 16'($urandom_range(1, 5000)) : 16'd0,
                                      16'($urandom_range(0, CAP - 1))});
      idx = $urandom_range(0, CAP - 1);
      exp_w.delete(); got.delete();
      for (int f = nf - 1; f >= 0; f--) begin
        logic [31:0] w;
        w = mem.peek(SB + f * CAP + idx);
        if (w[31:16] != 0) exp_w.push_back(w[31:16]);
        idx = int'(w[5:0]);
      end
      @(negedge clk); start = 1; nframes = 16'(nf); best_idx = 6'(mem.peek(0) % CAP);
      best_idx = 6'(idx);
      // recompute with the chosen start index
      idx = int'(best_idx); exp_w.delete();
      for (int f = nf - 1; f >= 0; f--) begin
        logic [31:0] w;
        w = mem.peek(SB + f * CAP + idx);
        if (w[31:16] != 0) exp_w.push_back(w[31:16]);
        idx = int'(w[5:0]);
      end
      @(negedge clk); start = 0;
      while (!done) begin
        word_ready = ($urandom_range(0, 1) == 1);
        @(posedge clk);
        if (word_valid && word_ready) got.push_back(word);
        @(negedge clk);
      end
      checks++;
      if (got != exp_w) begin failures++; $display("FAIL trial %0d: %0d words, expected %0d", trial, got.size(), exp_w.size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
