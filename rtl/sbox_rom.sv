// sbox_rom: the AES S-box held as a 256 x 8 read-only block memory.
//
// The byte to substitute is the address and the substituted byte is the
// data word, as in a block RAM with a registered output: the address given
// with `en` high in one cycle appears on `dout` after the next clock edge,
// so one lookup costs one cycle and lookups can be issued back to back.
// INVERSE selects the inverse S-box used by decryption.  The contents are
// computed at start-up from the GF(2^8) inverse and the AES affine map
// (functions in aes_pkg) rather than typed in as a table; the result is the
// standard table, e.g. 0x95 -> 0x2A.  Depth, width and the one-read-per-
// cycle memory follow the described S-box memory; computing the contents
// is this design's choice.
module sbox_rom
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic       clk,
  input  logic       en,
  input  logic [7:0] addr,
  output logic [7:0] dout
);

  logic [7:0] rom [256];

  initial begin
    for (int i = 0; i < 256; i++)
      rom[i] = INVERSE ? sbox_inv(8'(i)) : sbox_fwd(8'(i));
  end

  always_ff @(posedge clk) begin
    if (en) dout <= rom[addr];
  end

endmodule
