// key_expansion: the key expansion control unit of an AES-128 core.
//
// A `gen` pulse stores `key` in words 0..3 of a 44-word expanded-key
// buffer and clears `ready`.  Then, ten times over, the unit starts the g
// module on the last word of the previous round key, together with the
// current round constant, and when g is done lets word_xor form the four
// words of the next round key, which are written into the buffer.  The
// round constant starts at 01 and is doubled in GF(2^8) for each round
// (01, 02, 04 ... 80, 1B, 36).  After the tenth round key `ready` rises and
// stays high until the next `gen`.
//
// The whole expanded key is produced before any block is processed, so the
// same unit serves encryption (round keys 0 to 10) and decryption (10 down
// to 0).  `rd_key` returns the round key selected by `rd_round`
// combinationally; a round number above 10 reads as zero.  Each round key
// takes 7 cycles (1 to start g, 5 in g, 1 to store), so `ready` rises on
// the 70th clock edge after the edge that samples `gen`.  The buffer is a register array; the
// cycle timing is this design's choice.
module key_expansion
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       gen,
  input  state_t     key,
  output logic       ready,
  input  logic [3:0] rd_round,
  output state_t     rd_key
);

  typedef enum logic [1:0] {
    KE_IDLE,
    KE_G_START,
    KE_G_WAIT
  } ke_state_e;

  ke_state_e  state;
  word_t      w [EXP_WORDS];
  logic [3:0] rn;          // round key being generated, 1..10
  logic [7:0] rcon;
  logic       g_start;
  logic       g_done;
  word_t      g_word;
  state_t     prev_key;
  state_t     next_key;

  assign prev_key = {w[4*rn-4], w[4*rn-3], w[4*rn-2], w[4*rn-1]};
  assign g_start  = (state == KE_G_START);

  g_function u_g (
    .clk      (clk),
    .rst      (rst),
    .start    (g_start),
    .word_in  (w[4*rn-1]),
    .rcon     (rcon),
    .done     (g_done),
    .word_out (g_word)
  );

  word_xor u_xor (
    .prev_key (prev_key),
    .g_word   (g_word),
    .next_key (next_key)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= KE_IDLE;
      ready <= 1'b0;
      rn    <= 4'd1;
      rcon  <= 8'h01;
      for (int i = 0; i < EXP_WORDS; i++) w[i] <= '0;
    end else begin
      unique case (state)
        KE_IDLE: begin
          if (gen) begin
            w[0]  <= key[127:96];
            w[1]  <= key[95:64];
            w[2]  <= key[63:32];
            w[3]  <= key[31:0];
            rn    <= 4'd1;
            rcon  <= 8'h01;
            ready <= 1'b0;
            state <= KE_G_START;
          end
        end
        KE_G_START: state <= KE_G_WAIT;
        KE_G_WAIT: begin
          if (g_done) begin
            w[4*rn]   <= next_key[127:96];
            w[4*rn+1] <= next_key[95:64];
            w[4*rn+2] <= next_key[63:32];
            w[4*rn+3] <= next_key[31:0];
            if (rn == 4'(NR)) begin
              ready <= 1'b1;
              state <= KE_IDLE;
            end else begin
              rn    <= rn + 4'd1;
              rcon  <= xtime(rcon);
              state <= KE_G_START;
            end
          end
        end
        default: state <= KE_IDLE;
      endcase
    end
  end

  always_comb begin
    rd_key = '0;
    if (rd_round <= 4'(NR))
      rd_key = {w[4*rd_round], w[4*rd_round+1], w[4*rd_round+2], w[4*rd_round+3]};
  end

endmodule
