// mix_columns: the forward AES MixColumns transformation.
//
// Each column is multiplied by the circulant matrix (02 03 01 01) in
// GF(2^8).  As described for this design, every input byte is first
// multiplied by 2 (shift left, XOR 0x1B when the MSB was set) and by 3
// (the doubled value XOR the byte) into the arrays mul2 and mul3; each
// output byte is then the XOR of one mul2, one mul3 and two plain bytes,
// e.g. S'(6) = S(4) ^ S(5) ^ mul2(6) ^ mul3(7).  Combinational; making it
// a single combinational stage rather than storing the arrays in registers
// is this design's choice.
module mix_columns
  import aes_pkg::*;
(
  input  state_t din,
  output state_t dout
);

  logic [7:0] s    [16];
  logic [7:0] mul2 [16];
  logic [7:0] mul3 [16];

  always_comb begin
    for (int k = 0; k < 16; k++) begin
      s[k]    = din[127-8*k -: 8];
      mul2[k] = xtime(s[k]);
      mul3[k] = mul2[k] ^ s[k];
    end
    dout = '0;
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        // Row r of the matrix: 2 on column r, 3 on r+1, 1 on r+2 and r+3.
        dout[127-8*(4*c+r) -: 8] = mul2[4*c + r]
                                 ^ mul3[4*c + (r+1)%4]
                                 ^ s[4*c + (r+2)%4]
                                 ^ s[4*c + (r+3)%4];
      end
    end
  end

endmodule
