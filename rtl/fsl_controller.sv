// fsl_controller: the hardware controller between the processor's 32-bit
// FSL links and the two AES cipher cores.
//
// A session is one message.  The processor sends, over the slave FSL
// link, one word per item in this order:
//   1. mode word        bit 0: 0 = encrypt, 1 = decrypt (other bits ignored)
//   2. block count N    unsigned 32-bit number of 128-bit blocks
//   3. session key      4 words, first word = key bits 127:96
//   4. N blocks         4 words each, first word = block bits 127:96
// The mode selects which core receives the key and the blocks.  After the
// key words the controller pulses `key_load` on the selected core and waits
// for its `key_ready`; the expanded key then serves all N blocks.  Each
// block is started on the core, and when the core is done its result is
// sent back as 4 words on the master FSL link, first word = bits 127:96.
// After the N-th result the controller waits for the next mode word.
//
// FSL side: a word is taken when `fsl_s_exists` is high by pulsing
// `fsl_s_read` for one cycle, and written by pulsing `fsl_m_write` while
// `fsl_m_full` is low.  Every 32-bit word therefore costs a wait state and
// an acknowledge state, at least two cycles, four pairs per block each
// way.  The word order, the mode encoding and the count being a full word
// are this design's choices; the order mode, count, key, blocks follows the
// described protocol.  The FSL control bits are not used.
module fsl_controller
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // FSL slave link (processor -> accelerator)
  input  logic [31:0] fsl_s_data,
  input  logic        fsl_s_exists,
  output logic        fsl_s_read,
  // FSL master link (accelerator -> processor)
  output logic [31:0] fsl_m_data,
  output logic        fsl_m_write,
  input  logic        fsl_m_full,
  // cipher cores
  output cipher_req_t enc_req,
  input  cipher_rsp_t enc_rsp,
  output cipher_req_t dec_req,
  input  cipher_rsp_t dec_rsp,
  // status
  output mode_e       mode,
  output logic        session_active,
  output logic [31:0] blocks_left
);

  typedef enum logic [3:0] {
    S_MODE_WAIT, S_MODE_ACK,
    S_NUM_WAIT,  S_NUM_ACK,
    S_KEY_WAIT,  S_KEY_ACK,
    S_KEY_LOAD,  S_KEY_EXPAND,
    S_BLK_WAIT,  S_BLK_ACK,
    S_START,     S_BUSY,
    S_OUT_WAIT,  S_OUT_ACK
  } ctrl_state_e;

  ctrl_state_e state;
  logic [1:0]  word_cnt;     // word of the 4-word key/block being moved
  state_t      key_q;
  state_t      blk_q;
  state_t      res_q;
  logic        load_p;
  logic        start_p;
  cipher_rsp_t sel_rsp;

  assign sel_rsp = (mode == MODE_DECRYPT) ? dec_rsp : enc_rsp;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_MODE_WAIT;
      mode        <= MODE_ENCRYPT;
      word_cnt    <= '0;
      blocks_left <= '0;
      key_q       <= '0;
      blk_q       <= '0;
      res_q       <= '0;
    end else begin
      unique case (state)
        S_MODE_WAIT:  if (fsl_s_exists) state <= S_MODE_ACK;
        S_MODE_ACK: begin
          mode  <= mode_e'(fsl_s_data[0]);
          state <= S_NUM_WAIT;
        end
        S_NUM_WAIT:   if (fsl_s_exists) state <= S_NUM_ACK;
        S_NUM_ACK: begin
          blocks_left <= fsl_s_data;
          word_cnt    <= '0;
          state       <= S_KEY_WAIT;
        end
        S_KEY_WAIT:   if (fsl_s_exists) state <= S_KEY_ACK;
        S_KEY_ACK: begin
          key_q    <= {key_q[95:0], fsl_s_data};
          word_cnt <= word_cnt + 2'd1;
          state    <= (word_cnt == 2'd3) ? S_KEY_LOAD : S_KEY_WAIT;
        end
        S_KEY_LOAD:   state <= S_KEY_EXPAND;
        S_KEY_EXPAND: begin
          if (sel_rsp.key_ready) begin
            word_cnt <= '0;
            state    <= (blocks_left == '0) ? S_MODE_WAIT : S_BLK_WAIT;
          end
        end
        S_BLK_WAIT:   if (fsl_s_exists) state <= S_BLK_ACK;
        S_BLK_ACK: begin
          blk_q    <= {blk_q[95:0], fsl_s_data};
          word_cnt <= word_cnt + 2'd1;
          state    <= (word_cnt == 2'd3) ? S_START : S_BLK_WAIT;
        end
        S_START:      state <= S_BUSY;
        S_BUSY: begin
          if (sel_rsp.done) begin
            res_q    <= sel_rsp.dout;
            word_cnt <= '0;
            state    <= S_OUT_WAIT;
          end
        end
        S_OUT_WAIT:   if (!fsl_m_full) state <= S_OUT_ACK;
        S_OUT_ACK: begin
          res_q    <= {res_q[95:0], 32'h0};
          word_cnt <= word_cnt + 2'd1;
          if (word_cnt == 2'd3) begin
            blocks_left <= blocks_left - 32'd1;
            state       <= (blocks_left == 32'd1) ? S_MODE_WAIT : S_BLK_WAIT;
          end else begin
            state <= S_OUT_WAIT;
          end
        end
        default: state <= S_MODE_WAIT;
      endcase
    end
  end

  // The wait states only move on when the link is ready, so the
  // acknowledge states can read and write unconditionally.
  assign fsl_s_read  = (state == S_MODE_ACK) || (state == S_NUM_ACK) ||
                       (state == S_KEY_ACK)  || (state == S_BLK_ACK);
  assign fsl_m_write = (state == S_OUT_ACK);
  assign fsl_m_data  = res_q[127:96];

  assign load_p         = (state == S_KEY_LOAD);
  assign start_p        = (state == S_START);
  assign session_active = (state != S_MODE_WAIT) && (state != S_MODE_ACK);

  always_comb begin
    enc_req.key      = key_q;
    enc_req.din      = blk_q;
    enc_req.key_load = load_p  && (mode == MODE_ENCRYPT);
    enc_req.start    = start_p && (mode == MODE_ENCRYPT);
    dec_req.key      = key_q;
    dec_req.din      = blk_q;
    dec_req.key_load = load_p  && (mode == MODE_DECRYPT);
    dec_req.start    = start_p && (mode == MODE_DECRYPT);
  end

  // FSL rules: read only a word that exists, write only when not full.
  assert property (@(posedge clk) disable iff (rst) fsl_s_read |-> fsl_s_exists);
  assert property (@(posedge clk) disable iff (rst) fsl_m_write |-> !fsl_m_full);

endmodule
