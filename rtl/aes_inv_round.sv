// aes_inv_round: one AES decryption round, the unit the decryption core
// reuses for all ten rounds.
//
// The round runs InvShiftRows -> InvSubBytes -> AddRoundKey ->
// InvMixColumns, the inverse cipher of FIPS-197.  When `last` (the tenth
// round, using round key 0) is high, InvMixColumns is bypassed.
// InvShiftRows is wiring in front of the sequential InvSubBytes unit; a
// `start` pulse latches the shifted state there and `done` pulses 17 cycles
// later with the round result on `dout`.  `round_key` and `last` must be
// held stable while the round runs and `dout` is read.  Using the inverse
// transformations in one reusable round follows the described design; the
// exact order inside the round and the timing are this design's choices.
module aes_inv_round
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  logic   last,
  input  state_t din,
  input  state_t round_key,
  output logic   busy,
  output logic   done,
  output state_t dout
);

  state_t sr_out, sb_out, ark_out, mc_out;

  shift_rows #(.INVERSE(1'b1)) u_isr (
    .din  (din),
    .dout (sr_out)
  );

  sub_bytes #(.INVERSE(1'b1)) u_isub (
    .clk   (clk),
    .rst   (rst),
    .start (start),
    .din   (sr_out),
    .busy  (busy),
    .done  (done),
    .dout  (sb_out)
  );

  add_round_key u_ark (
    .din       (sb_out),
    .round_key (round_key),
    .dout      (ark_out)
  );

  inv_mix_columns u_imc (
    .din  (ark_out),
    .dout (mc_out)
  );

  assign dout = last ? ark_out : mc_out;

endmodule
