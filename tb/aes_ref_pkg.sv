// aes_ref_pkg: a behavioural AES-128 reference for the testbenches.
//
// It is written independently of the RTL: the state is an array of 16
// bytes, the S-box is built by searching for the multiplicative inverse
// and applying the affine map bit by bit, MixColumns multiplies by the
// matrix with a generic GF(2^8) product, and the key schedule follows the
// FIPS-197 pseudocode.  It also holds the software side of a session:
// message padding (a 0x01 byte then 0x00 bytes up to a whole block).
package aes_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  function automatic logic [7:0] rmul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011B << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] rsbox(logic [7:0] a);
    logic [7:0] inv, s;
    inv = 8'h00;
    for (int x = 1; x < 256; x++) if (rmul(a, 8'(x)) == 8'h01) inv = 8'(x);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8]
             ^ ((8'h63 >> i) & 8'h01) != 0;
    return s;
  endfunction

  function automatic logic [7:0] rsbox_inv(logic [7:0] a);
    for (int x = 0; x < 256; x++) if (rsbox(8'(x)) == a) return 8'(x);
    return 8'h00;
  endfunction

  function automatic bytes16_t to_bytes(logic [127:0] v);
    bytes16_t b;
    for (int k = 0; k < 16; k++) b[k] = v[127-8*k -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_bytes(bytes16_t b);
    logic [127:0] v;
    for (int k = 0; k < 16; k++) v[127-8*k -: 8] = b[k];
    return v;
  endfunction

  // (inverse) ShiftRows on a 128-bit state
  function automatic logic [127:0] rshift(logic [127:0] v, bit inv);
    bytes16_t a, o;
    a = to_bytes(v);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) o[r + 4*c] = a[r + 4*((c + r) % 4)];
        else      o[r + 4*((c + r) % 4)] = a[r + 4*c];
    return from_bytes(o);
  endfunction

  // (inverse) MixColumns on a 128-bit state
  function automatic logic [127:0] rmix(logic [127:0] v, bit inv);
    bytes16_t a, o;
    logic [7:0] m [4];
    a = to_bytes(v);
    m = inv ? '{8'h0E, 8'h0B, 8'h0D, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[4*c + r] = 8'h00;
        for (int j = 0; j < 4; j++) o[4*c + r] ^= rmul(m[(j - r + 4) % 4], a[4*c + j]);
      end
    return from_bytes(o);
  endfunction

  function automatic logic [127:0] rsub(logic [127:0] v, bit inv);
    bytes16_t a;
    a = to_bytes(v);
    for (int k = 0; k < 16; k++) a[k] = inv ? rsbox_inv(a[k]) : rsbox(a[k]);
    return from_bytes(a);
  endfunction

  // Round key n (0..10) of the FIPS-197 key schedule.
  function automatic logic [127:0] rround_key(logic [127:0] key, int n);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {rsbox(t[31:24]), rsbox(t[23:16]), rsbox(t[15:8]), rsbox(t[7:0])};
        t[31:24] ^= rc;
        rc = rmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*n], w[4*n+1], w[4*n+2], w[4*n+3]};
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] key, logic [127:0] pt);
    logic [127:0] s;
    s = pt ^ rround_key(key, 0);
    for (int r = 1; r <= 10; r++) begin
      s = rshift(rsub(s, 0), 0);
      if (r != 10) s = rmix(s, 0);
      s ^= rround_key(key, r);
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt(logic [127:0] key, logic [127:0] ct);
    logic [127:0] s;
    s = ct ^ rround_key(key, 10);
    for (int r = 9; r >= 0; r--) begin
      s = rsub(rshift(s, 1), 1) ^ rround_key(key, r);
      if (r != 0) s = rmix(s, 1);
    end
    return s;
  endfunction

endpackage
