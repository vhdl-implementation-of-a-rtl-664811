// aes_ref_pkg: reference model of AES-128 used by the testbenches.
//
// Written independently of the RTL package: the S-box is found by searching
// for the multiplicative inverse and applying the affine matrix row by row,
// MixColumns uses a general GF(2^8) multiply, and the key schedule is the
// word recurrence w[i] = w[i-4] ^ f(w[i-1]) of FIPS-197. Blocks are
// logic [127:0] with byte 0 in the top bits.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] inv, y;
    inv = 0;
    for (int c = 1; c < 256; c++)
      if (mul(x, 8'(c)) == 8'h01) inv = 8'(c);
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return y ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] y);
    for (int c = 0; c < 256; c++)
      if (sbox(8'(c)) == y) return 8'(c);
    return 0;
  endfunction

  function automatic logic [7:0] gb(blk_t s, int r, int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic blk_t enc_round(blk_t s, blk_t k, bit last);
    blk_t o;
    logic [7:0] t [4][4];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        t[r][c] = sbox(gb(s, r, (c + r) % 4));
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (last) o[127 - 8*(4*c + r) -: 8] = t[r][c];
        else o[127 - 8*(4*c + r) -: 8] = mul(8'h02, t[r][c]) ^ mul(8'h03, t[(r+1)%4][c]) ^
                                        t[(r+2)%4][c] ^ t[(r+3)%4][c];
    return o ^ k;
  endfunction

  // Inverse round in the order used by the decryption datapath:
  // InvShiftRows, InvSubBytes, AddRoundKey, then InvMixColumns unless last.
  function automatic blk_t dec_round(blk_t s, blk_t k, bit last);
    blk_t o, m;
    logic [7:0] t [4][4];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        t[r][(c + r) % 4] = inv_sbox(gb(s, r, c)) ^ gb(k, r, (c + r) % 4);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        m[127 - 8*(4*c + r) -: 8] = t[r][c];
    if (last) return m;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = mul(8'h0e, t[r][c]) ^ mul(8'h0b, t[(r+1)%4][c]) ^
                                    mul(8'h0d, t[(r+2)%4][c]) ^ mul(8'h09, t[(r+3)%4][c]);
    return o;
  endfunction

  typedef blk_t keys_t [11];

  function automatic keys_t expand(blk_t key);
    keys_t ks;
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0]), sbox(t[31:24])} ^ {rc, 24'h0};
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) ks[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return ks;
  endfunction

  function automatic blk_t encrypt(blk_t pt, blk_t key);
    keys_t ks;
    blk_t s;
    ks = expand(key);
    s = pt ^ ks[0];
    for (int r = 1; r <= 10; r++) s = enc_round(s, ks[r], r == 10);
    return s;
  endfunction

  function automatic blk_t decrypt(blk_t ct, blk_t key);
    keys_t ks;
    blk_t s;
    ks = expand(key);
    s = ct ^ ks[10];
    for (int r = 9; r >= 0; r--) s = dec_round(s, ks[r], r == 0);
    return s;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Known-answer vectors (FIPS-197 appendix / RFC 3602 case 2).
  localparam blk_t KAT1_PT  = 128'h3243f6a8885a308d313198a2e0370734;
  localparam blk_t KAT1_KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam blk_t KAT1_CT  = 128'h3925841d02dc09fbdc118597196a0b32;
  localparam blk_t KAT2_PT  = 128'h00112233445566778899aabbccddeeff;
  localparam blk_t KAT2_KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam blk_t KAT2_CT  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
  localparam blk_t CBC_KEY  = 128'hc286696d887c9aa0611bbb3e2025a45a;
  localparam blk_t CBC_IV   = 128'h562e17996d093d28ddb3ba695a2e6f58;
  localparam blk_t CBC_PT0  = 128'h000102030405060708090a0b0c0d0e0f;
  localparam blk_t CBC_PT1  = 128'h101112131415161718191a1b1c1d1e1f;
  localparam blk_t CBC_CT0  = 128'hd296cd94c2cccf8a3a863028b5e1dc0a;
  localparam blk_t CBC_CT1  = 128'h7586602d253cfff91b8266bea6d61ab1;
endpackage
