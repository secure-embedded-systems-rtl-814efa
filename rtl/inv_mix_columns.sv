// inv_mix_columns: the inverse AES MixColumns transformation.
//
// Each column is multiplied by the circulant matrix (0E 0B 0D 09) in
// GF(2^8).  Every input byte is doubled three times in succession to give
// mul2, mul4 and mul8, and the four products needed are formed from them:
//   mul9 = s ^ mul8,  mulB = s ^ mul2 ^ mul8,
//   mulD = s ^ mul4 ^ mul8,  mulE = mul2 ^ mul4 ^ mul8.
// Each output byte is the XOR of one product of each kind taken from the
// four bytes of its column.  The product scheme follows the described
// design; being purely combinational is this design's choice.
module inv_mix_columns
  import aes_pkg::*;
(
  input  state_t din,
  output state_t dout
);

  logic [7:0] s    [16];
  logic [7:0] mul2 [16];
  logic [7:0] mul4 [16];
  logic [7:0] mul8 [16];
  logic [7:0] mul9 [16];
  logic [7:0] mulb [16];
  logic [7:0] muld [16];
  logic [7:0] mule [16];

  always_comb begin
    for (int k = 0; k < 16; k++) begin
      s[k]    = din[127-8*k -: 8];
      mul2[k] = xtime(s[k]);
      mul4[k] = xtime(mul2[k]);
      mul8[k] = xtime(mul4[k]);
      mul9[k] = s[k] ^ mul8[k];
      mulb[k] = s[k] ^ mul2[k] ^ mul8[k];
      muld[k] = s[k] ^ mul4[k] ^ mul8[k];
      mule[k] = mul2[k] ^ mul4[k] ^ mul8[k];
    end
    dout = '0;
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        // Row r: 0E on column r, 0B on r+1, 0D on r+2, 09 on r+3.
        dout[127-8*(4*c+r) -: 8] = mule[4*c + r]
                                 ^ mulb[4*c + (r+1)%4]
                                 ^ muld[4*c + (r+2)%4]
                                 ^ mul9[4*c + (r+3)%4];
      end
    end
  end

endmodule
