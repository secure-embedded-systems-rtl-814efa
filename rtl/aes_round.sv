// aes_round: one AES encryption round, the unit the encryption core reuses
// for all ten rounds.
//
// The round runs SubBytes -> ShiftRows -> MixColumns -> AddRoundKey.  When
// `last` (round 10) is high, MixColumns is bypassed and the ShiftRows
// output goes straight to AddRoundKey.  A `start` pulse hands `din` to the
// sequential SubBytes unit; the rest of the round is combinational after
// its output register, so `done` pulses 17 cycles after `start` with the
// round result on `dout`.  `round_key` and `last` must be held stable while
// the round runs and `dout` is read; `dout` is valid while `done` is high
// and until the next `start`.  The structure (one reusable round, a round-10
// line that disables MixColumns) follows the described space-optimised
// design; the cycle timing is this design's own.
module aes_round
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

  state_t sb_out, sr_out, mc_out, ark_in;

  sub_bytes #(.INVERSE(1'b0)) u_sub (
    .clk   (clk),
    .rst   (rst),
    .start (start),
    .din   (din),
    .busy  (busy),
    .done  (done),
    .dout  (sb_out)
  );

  shift_rows #(.INVERSE(1'b0)) u_sr (
    .din  (sb_out),
    .dout (sr_out)
  );

  mix_columns u_mc (
    .din  (sr_out),
    .dout (mc_out)
  );

  assign ark_in = last ? sr_out : mc_out;

  add_round_key u_ark (
    .din       (ark_in),
    .round_key (round_key),
    .dout      (dout)
  );

endmodule
