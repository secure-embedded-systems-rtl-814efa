// aes_pkg: types, constants and GF(2^8) helper functions shared by the AES
// engine.
//
// A 128-bit AES state is held as a packed vector.  Byte k of the state is
// bits [127-8k -: 8], so the first byte received is the most significant
// one.  The bytes fill the 4x4 state column by column: byte k sits in row
// k%4 and column k/4, which is the numbering S(4*col+row) used by the
// MixColumns description.  The S-box contents are not stored as a table:
// sbox_fwd() and sbox_inv() compute them from the multiplicative inverse in
// GF(2^8) and the AES affine map, and the ROMs call them once at start-up.
// The operating-mode encoding and the request/response bundles between the
// FSL controller and the two cipher cores are this design's own choice.
package aes_pkg;

  localparam int unsigned NR        = 10;        // rounds of AES-128
  localparam int unsigned EXP_WORDS = 4 * (NR + 1);  // 44 expanded-key words
  localparam logic [7:0]  GF_POLY   = 8'h1B;     // x^8 + x^4 + x^3 + x + 1

  typedef logic [127:0] state_t;
  typedef logic [31:0]  word_t;

  // Operating mode, sent by software as the first word of a session.
  typedef enum logic {
    MODE_ENCRYPT = 1'b0,
    MODE_DECRYPT = 1'b1
  } mode_e;

  // Controller -> cipher core.
  typedef struct packed {
    logic   key_load;  // pulse: expand `key` into the round-key buffer
    logic   start;     // pulse: process `din` with the loaded key
    state_t key;
    state_t din;
  } cipher_req_t;

  // Cipher core -> controller.
  typedef struct packed {
    logic   key_ready; // level: the expanded key is complete
    logic   busy;      // a block is being processed
    logic   done;      // pulse: `dout` holds the result
    state_t dout;
  } cipher_rsp_t;

  // Byte k (0 = most significant) of a state.
  function automatic logic [7:0] get_byte(state_t s, int unsigned k);
    return s[127-8*k -: 8];
  endfunction

  // Multiply by 2 in GF(2^8): shift left, reduce when the MSB was set.
  function automatic logic [7:0] xtime(logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? GF_POLY : 8'h00);
  endfunction

  // General GF(2^8) multiply by shift-and-add.
  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic logic [7:0] gf_inv(logic [7:0] a);
    logic [7:0] r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin   // 254 = 0b1111_1110
      if (i != 0) r = gf_mul(r, sq);
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] b, int unsigned n);
    return (b << n) | (b >> (8 - n));
  endfunction

  // Forward S-box: inverse followed by the affine map with constant 0x63.
  function automatic logic [7:0] sbox_fwd(logic [7:0] a);
    logic [7:0] b;
    b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // Inverse S-box: inverse affine map followed by the field inverse.
  function automatic logic [7:0] sbox_inv(logic [7:0] a);
    return gf_inv(rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05);
  endfunction

endpackage
