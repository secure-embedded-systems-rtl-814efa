// word_xor: forms the next AES round key from the previous one.
//
// With the previous round key W[4n-4..4n-1] and g = G(W[4n-1]) it returns
//   W[4n]   = W[4n-4] ^ g
//   W[4n+1] = W[4n-3] ^ W[4n]
//   W[4n+2] = W[4n-2] ^ W[4n+1]
//   W[4n+3] = W[4n-1] ^ W[4n+2]
// as one 128-bit value, first word most significant.  Combinational: the
// key expansion control unit stores the result in its buffer.  The
// equations are the standard AES-128 key schedule, as described for the
// word XOR module.
module word_xor
  import aes_pkg::*;
(
  input  state_t prev_key,
  input  word_t  g_word,
  output state_t next_key
);

  word_t w [4];

  always_comb begin
    w[0] = prev_key[127:96] ^ g_word;
    w[1] = prev_key[95:64]  ^ w[0];
    w[2] = prev_key[63:32]  ^ w[1];
    w[3] = prev_key[31:0]   ^ w[2];
    next_key = {w[0], w[1], w[2], w[3]};
  end

endmodule
