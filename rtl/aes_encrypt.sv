// aes_encrypt: space-optimised AES-128 encryption core.
//
// One round unit (aes_round) is built in hardware and run ten times.  A
// `req.key_load` pulse, accepted while idle, makes the key expansion
// control unit expand `req.key` into its 44-word buffer; `rsp.key_ready`
// rises when it is done (70 cycles) and the key is then used for every
// block until the next load.  A `req.start` pulse, accepted while idle with
// the key ready, adds round key 0 to `req.din` and then runs rounds 1 to
// 10, fetching round key n from the expansion buffer for round n; round 10
// is run with MixColumns disabled.  `rsp.done` pulses with the ciphertext
// on `rsp.dout`, 190 clock edges after the edge that samples `req.start` (19 per
// round: one to start the round unit, 17 in SubBytes, one to store the
// state).  `rsp.dout` holds until the next block finishes.  Expanding the
// whole key before the first block, and the cycle timing, follow the
// described structure; the request/response bundles are this design's own.
module aes_encrypt
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  cipher_req_t req,
  output cipher_rsp_t rsp
);

  typedef enum logic [1:0] {
    C_IDLE,
    C_ROUND_START,
    C_ROUND_WAIT
  } core_state_e;

  core_state_e state;
  state_t      st;           // the AES state between rounds
  logic [3:0]  rn;           // current round, 1..10
  logic [3:0]  rd_round;
  state_t      round_key;
  logic        key_ready;
  logic        round_start;
  logic        round_busy;
  logic        round_done;
  state_t      round_out;
  state_t      ark0_out;
  logic        done_q;
  state_t      dout_q;

  assign rd_round    = (state == C_IDLE) ? 4'd0 : rn;
  assign round_start = (state == C_ROUND_START);

  key_expansion u_kexp (
    .clk      (clk),
    .rst      (rst),
    .gen      (req.key_load && state == C_IDLE),
    .key      (req.key),
    .ready    (key_ready),
    .rd_round (rd_round),
    .rd_key   (round_key)
  );

  // Initial AddRoundKey, before the first round.
  add_round_key u_ark0 (
    .din       (req.din),
    .round_key (round_key),
    .dout      (ark0_out)
  );

  aes_round u_round (
    .clk       (clk),
    .rst       (rst),
    .start     (round_start),
    .last      (rn == 4'(NR)),
    .din       (st),
    .round_key (round_key),
    .busy      (round_busy),
    .done      (round_done),
    .dout      (round_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= C_IDLE;
      st     <= '0;
      rn     <= 4'd1;
      done_q <= 1'b0;
      dout_q <= '0;
    end else begin
      done_q <= 1'b0;
      unique case (state)
        C_IDLE: begin
          if (req.start && key_ready && !req.key_load) begin
            st    <= ark0_out;
            rn    <= 4'd1;
            state <= C_ROUND_START;
          end
        end
        C_ROUND_START: state <= C_ROUND_WAIT;
        C_ROUND_WAIT: begin
          if (round_done) begin
            st <= round_out;
            if (rn == 4'(NR)) begin
              dout_q <= round_out;
              done_q <= 1'b1;
              state  <= C_IDLE;
            end else begin
              rn    <= rn + 4'd1;
              state <= C_ROUND_START;
            end
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    rsp.key_ready = key_ready;
    rsp.busy      = (state != C_IDLE);
    rsp.done      = done_q;
    rsp.dout      = dout_q;
  end

  // A round is only started when the round unit is free.
  assert property (@(posedge clk) disable iff (rst) round_start |-> !round_busy);

endmodule
