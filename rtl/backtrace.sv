// backtrace: recovers the word sequence of the best hypothesis at the end
// of an utterance from the per-frame snapshots in external memory.
//
// The snapshot of frame f holds one word per stored state at
// snap_base + f*CAP + index: {output label[31:16], back-pointer[IW-1:0]}
// where the back-pointer is the state's index in the previous frame's list.
// Starting from best_idx in the last frame, the unit reads one word per
// frame, emits the output label when it is non-zero, and follows the
// back-pointer, down to frame 0. Words therefore come out last word first.
// Handshakes: start pulse; word_valid/word_ready stream; done pulse.
// The document states that a backtrace is built from saved snapshots at the
// end of an utterance; the snapshot format and word order are this
// design's choices.
module backtrace
  import asr_pkg::*;
#(
  parameter int CAP = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] nframes,
  input  logic [$clog2(CAP)-1:0] best_idx,
  input  addr_t       snap_base,
  output logic        mreq_valid,
  input  logic        mreq_ready,
  output mem_req_t    mreq,
  input  logic        mrsp_valid,
  input  word_t       mrsp_data,
  output logic        word_valid,
  input  logic        word_ready,
  output logic [15:0] word,
  output logic        done,
  output logic        busy
);
  localparam int IW = $clog2(CAP);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_EMIT} st_t;
  st_t st;
  logic [15:0] f;
  logic [IW-1:0] idx;

  assign busy = (st != S_IDLE);
  assign mreq_valid = (st == S_REQ);
  assign mreq = '{we: 1'b0, addr: snap_base + addr_t'(32'(f) * CAP) + addr_t'(idx), wdata: '0};
  assign word_valid = (st == S_EMIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; f <= '0; idx <= '0; word <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          if (nframes == 16'd0) done <= 1'b1;
          else begin f <= nframes - 1'b1; idx <= best_idx; st <= S_REQ; end
        end
        S_REQ:  if (mreq_ready) st <= S_WAIT;
        S_WAIT: if (mrsp_valid) begin
          idx  <= mrsp_data[IW-1:0];
          word <= mrsp_data[31:16];
          if (mrsp_data[31:16] != 16'd0) st <= S_EMIT;
          else if (f == 16'd0) begin st <= S_IDLE; done <= 1'b1; end
          else begin f <= f - 1'b1; st <= S_REQ; end
        end
        S_EMIT: if (word_ready) begin
          if (f == 16'd0) begin st <= S_IDLE; done <= 1'b1; end
          else begin f <= f - 1'b1; st <= S_REQ; end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
