// host_ctrl: control module. Decodes byte commands from the host and drives
// the front-end, the search and the external memory.
//
// The host link is a byte stream in each direction with valid/ready
// handshakes (as delivered by a USB FIFO bridge or a UART). Commands (the
// encoding is this design's; multi-byte fields are big-endian):
//   0x01 addr[4] n[2] data[4]*n  write n words to external memory
//   0x02 n[2] sample[2]*n        send n audio samples to the front-end
//   0x03 value[2]*39             send one feature vector directly to search
//   0x04 reg[1] value[4]         set configuration register
//   0x05 sel[1]                  read statistics register (4 bytes back)
//   0x06                         start utterance
//   0x07                         end utterance; the recognized word IDs are
//                                returned as 2-byte values, last word first,
//                                followed by 0xFFFF
//   0x08                         load GMM quantization tables from memory
// Configuration registers: 0 start state, 1 start arc count, 2 snapshot
// base, 3 GMM base, 4 quantization table base, 5 initial beam, 6 beam
// minimum, 7 beam maximum, 8 feedback gain, 9 target list size, 10 flags
// (bit 0 arc cache enable, bit 1 GMM cache enable).
// The document specifies what the host can do (program models, send audio
// or features, adjust parameters, read statistics); the byte protocol and
// register map are this design's.
module host_ctrl
  import asr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,
  output logic        rx_ready,
  input  logic [7:0]  rx_data,
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic [7:0]  tx_data,
  // memory writes
  output logic        mreq_valid,
  input  logic        mreq_ready,
  output mem_req_t    mreq,
  // audio and features
  output logic        audio_valid,
  input  logic        audio_ready,
  output logic signed [15:0] audio_data,
  output logic        feat_valid,
  input  logic        feat_ready,
  output feat_vec_t   feat,
  // search control
  output logic        utt_start,
  output logic        utt_end,
  output logic        load_tables,
  input  logic        word_valid,
  output logic        word_ready,
  input  logic [15:0] word,
  input  logic        bt_done,
  output logic [7:0]  stat_sel,
  input  logic [31:0] stat_value,
  // configuration
  output addr_t       start_state,
  output logic [15:0] start_narcs,
  output addr_t       snap_base,
  output addr_t       gmm_base,
  output addr_t       qt_base,
  output score_t      beam_init,
  output score_t      beam_min,
  output score_t      beam_max,
  output logic [15:0] beam_gain,
  output logic [23:0] n_target,
  output logic        arc_cache_en,
  output logic        gmm_cache_en
);
  typedef enum logic [3:0] {
    S_CMD, S_ARG, S_WDATA, S_WREQ, S_ADATA, S_AOUT, S_FDATA, S_FOUT,
    S_TX, S_STAT, S_WORDS
  } st_t;
  st_t st;
  logic [7:0]  cmd;
  logic [47:0] arg;
  logic [6:0]  nb, need;
  logic [15:0] cnt;
  addr_t       waddr;
  logic [31:0] txsh;
  logic [2:0]  txn;
  logic        bt_seen;

  assign rx_ready = (st == S_CMD) || (st == S_ARG) || (st == S_WDATA) ||
                    (st == S_ADATA) || (st == S_FDATA);
  wire rx = rx_valid && rx_ready;

  assign mreq_valid  = (st == S_WREQ);
  assign mreq        = '{we: 1'b1, addr: waddr, wdata: arg[31:0]};
  assign audio_valid = (st == S_AOUT);
  assign audio_data  = arg[15:0];
  assign feat_valid  = (st == S_FOUT);
  assign tx_valid    = (st == S_TX);
  assign tx_data     = txsh[31:24];
  assign word_ready  = (st == S_WORDS);
  assign stat_sel    = arg[7:0];

  function automatic logic [6:0] args_of(input logic [7:0] c);
    case (c)
      8'h01: return 7'd6;
      8'h02: return 7'd2;
      8'h04: return 7'd5;
      8'h05: return 7'd1;
      default: return 7'd0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_CMD; cmd <= '0; arg <= '0; nb <= '0; need <= '0; cnt <= '0; waddr <= '0;
      txsh <= '0; txn <= '0; feat <= '0; bt_seen <= 1'b0;
      utt_start <= 1'b0; utt_end <= 1'b0; load_tables <= 1'b0;
      start_state <= '0; start_narcs <= 16'd1; snap_base <= 32'h0100_0000;
      gmm_base <= 32'h0080_0000; qt_base <= 32'h00F0_0000;
      beam_init <= 32'sd2560; beam_min <= 32'sd256; beam_max <= 32'sd8192;
      beam_gain <= 16'd0; n_target <= 24'd2048; arc_cache_en <= 1'b1; gmm_cache_en <= 1'b1;
    end else begin
      utt_start <= 1'b0; utt_end <= 1'b0; load_tables <= 1'b0;
      if (bt_done) bt_seen <= 1'b1;
      case (st)
        S_CMD: if (rx) begin
          cmd <= rx_data; nb <= '0; need <= args_of(rx_data); arg <= '0;
          case (rx_data)
            8'h01, 8'h02, 8'h04, 8'h05: st <= S_ARG;
            8'h03: begin st <= S_FDATA; nb <= '0; end
            8'h06: utt_start <= 1'b1;
            8'h07: begin utt_end <= 1'b1; bt_seen <= 1'b0; st <= S_WORDS; end
            8'h08: load_tables <= 1'b1;
            default: ;
          endcase
        end
        S_ARG: if (rx) begin
          arg <= {arg[39:0], rx_data};
          nb  <= nb + 1'b1;
          if (nb + 1'b1 == need) begin
            case (cmd)
              8'h01: begin
                waddr <= {arg[39:8]}; cnt <= {arg[7:0], rx_data};
                st <= ({arg[7:0], rx_data} == 16'd0) ? S_CMD : S_WDATA; nb <= '0;
              end
              8'h02: begin
                cnt <= {arg[7:0], rx_data};
                st <= ({arg[7:0], rx_data} == 16'd0) ? S_CMD : S_ADATA; nb <= '0;
              end
              8'h04: begin
                case (arg[31:24])
                  8'd0:  start_state  <= {arg[23:0], rx_data};
                  8'd1:  start_narcs  <= {arg[7:0], rx_data};
                  8'd2:  snap_base    <= {arg[23:0], rx_data};
                  8'd3:  gmm_base     <= {arg[23:0], rx_data};
                  8'd4:  qt_base      <= {arg[23:0], rx_data};
                  8'd5:  beam_init    <= {arg[23:0], rx_data};
                  8'd6:  beam_min     <= {arg[23:0], rx_data};
                  8'd7:  beam_max     <= {arg[23:0], rx_data};
                  8'd8:  beam_gain    <= {arg[7:0], rx_data};
                  8'd9:  n_target     <= {arg[15:0], rx_data};
                  8'd10: {gmm_cache_en, arc_cache_en} <= rx_data[1:0];
                  default: ;
                endcase
                st <= S_CMD;
              end
              default: begin   // 0x05: statistics read, sel now in arg[7:0]
                arg <= {40'd0, rx_data};
                st <= S_STAT;
              end
            endcase
          end
        end
        S_WDATA: if (rx) begin
          arg <= {arg[39:0], rx_data};
          nb <= nb + 1'b1;
          if (nb == 7'd3) st <= S_WREQ;
        end
        S_WREQ: if (mreq_ready) begin
          waddr <= waddr + 1'b1; cnt <= cnt - 1'b1; nb <= '0;
          st <= (cnt == 16'd1) ? S_CMD : S_WDATA;
        end
        S_ADATA: if (rx) begin
          arg <= {arg[39:0], rx_data};
          nb <= nb + 1'b1;
          if (nb == 7'd1) st <= S_AOUT;
        end
        S_AOUT: if (audio_ready) begin
          cnt <= cnt - 1'b1; nb <= '0;
          st <= (cnt == 16'd1) ? S_CMD : S_ADATA;
        end
        S_FDATA: if (rx) begin
          // element 0 first; each value high byte first
          if (!nb[0]) feat[nb[6:1]][15:8] <= rx_data;
          else        feat[nb[6:1]][7:0]  <= rx_data;
          nb <= nb + 1'b1;
          if (int'(nb) == 2 * FEAT_DIM - 1) st <= S_FOUT;
        end
        S_FOUT: if (feat_ready) st <= S_CMD;
        S_TX: begin
          if (tx_ready) begin
            txsh <= {txsh[23:0], 8'h00};
            txn <= txn - 1'b1;
            if (txn == 3'd1) st <= (cmd == 8'h07) ? S_WORDS : S_CMD;
          end
        end
        S_STAT: begin txsh <= stat_value; txn <= 3'd4; st <= S_TX; end
        S_WORDS: begin
          if (word_valid) begin
            txsh <= {word, 16'h0}; txn <= 3'd2; st <= S_TX;
          end else if (bt_seen || bt_done) begin
            txsh <= 32'hFFFF_0000; txn <= 3'd2; st <= S_TX; cmd <= 8'h00;
          end
        end
        default: st <= S_CMD;
      endcase
    end
  end
endmodule
