// add_round_key: the AES AddRoundKey transformation.
//
// The state is XORed bit for bit with the four words of the current round
// key (word 0 in the most significant bits, matching column 0 of the
// state).  Combinational; used both for the initial key addition and at
// the end of every round.  The operation is the standard one; aligning key
// word 0 with state column 0 on a 128-bit bus is this design's choice.
module add_round_key
  import aes_pkg::*;
(
  input  state_t din,
  input  state_t round_key,
  output state_t dout
);

  assign dout = din ^ round_key;

endmodule
