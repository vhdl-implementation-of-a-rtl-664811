// aes_pkg: types, constants and pure functions shared by the AES engines.
//
// A 128-bit block is held as logic [127:0] with byte 0 in bits [127:120],
// the FIPS-197 ordering (the document numbers bits 0..127 from the MSB, which
// is the same ordering). State byte (row r, column c) is byte 4*c + r.
//
// The S-box and inverse S-box tables are not listed: they are computed at
// elaboration from the GF(2^8) multiplicative inverse followed by the affine
// transform given for SubBytes, so the ROM contents can be checked against
// their definition. Everything else (xtime, ShiftRows, MixColumns and their
// inverses, RCON) follows the AES chapter of the document directly.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef logic [255:0][7:0] byte_table_t;

  localparam int unsigned NR = 10;          // rounds for a 128-bit key

  // Mode field of the 16-bit context word (document bits 2:3).
  typedef enum logic [1:0] {
    MODE_ECB = 2'b01,
    MODE_CBC = 2'b10
  } mode_e;

  // Which engine a shared control state machine is sequencing.
  typedef enum logic [1:0] {
    ENG_ENCRYPT = 2'd0,
    ENG_DECRYPT = 2'd1,
    ENG_KEYGEN  = 2'd2
  } engine_e;

  // Context word, document bit 0 is the MSB (bit 15 here).
  typedef struct packed {
    logic        sop;       // 1 = first block of a packet
    logic        encrypt;   // 1 = encrypt, 0 = decrypt
    logic [1:0]  mode;      // 01 = ECB, 10 = CBC
    logic [11:0] key_index; // selects the key set
  } context_t;

  // Multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    logic [15:0] d;
    d = {b, b} << n;
    return d[15:8];
  endfunction

  // Forward S-box table: multiplicative inverse (0 maps to 0) then the
  // affine transform b ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 0x63.
  function automatic byte_table_t gen_sbox();
    byte_table_t t;
    byte_t exp_t [256];
    byte_t log_t [256];
    byte_t p, inv;
    p = 8'h01;
    for (int i = 0; i < 256; i++) log_t[i] = '0;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = p;
      log_t[p] = byte_t'(i);
      p = p ^ xtime(p);               // multiply by the generator 0x03
    end
    exp_t[255] = exp_t[0];
    for (int x = 0; x < 256; x++) begin
      if (x == 0) inv = '0;
      else        inv = exp_t[(255 - int'(log_t[x])) % 255];
      t[x] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    return t;
  endfunction

  function automatic byte_table_t gen_inv_sbox();
    byte_table_t f, t;
    f = gen_sbox();
    for (int x = 0; x < 256; x++) t[f[x]] = byte_t'(x);
    return t;
  endfunction

  localparam byte_table_t SBOX_TABLE     = gen_sbox();
  localparam byte_table_t INV_SBOX_TABLE = gen_inv_sbox();

  // Byte i (0 = most significant) of a block.
  function automatic byte_t get_byte(block_t b, int unsigned i);
    return b[127 - 8*i -: 8];
  endfunction

  // ShiftRows: row r of the result, column c takes column (c + r) mod 4.
  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = get_byte(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  // InvShiftRows: circular right shift of row r by r positions.
  function automatic block_t inv_shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*((c + r) % 4) + r) -: 8] = get_byte(s, 4*c + r);
    return o;
  endfunction

  // Balanced MixColumns of one column: the two 1x terms are summed first so
  // every output byte sees the same XOR depth (document 5.2.1.2).
  function automatic logic [31:0] mix_column(logic [31:0] col);
    byte_t s0, s1, s2, s3, d0, d1, d2, d3;
    {s0, s1, s2, s3} = col;
    d0 = xtime(s0); d1 = xtime(s1); d2 = xtime(s2); d3 = xtime(s3);
    return {(s2 ^ s3) ^ (d0 ^ (d1 ^ s1)),
            (s0 ^ s3) ^ (d1 ^ (d2 ^ s2)),
            (s0 ^ s1) ^ (d2 ^ (d3 ^ s3)),
            (s1 ^ s2) ^ (d3 ^ (d0 ^ s0))};
  endfunction

  function automatic logic [31:0] inv_mix_column(logic [31:0] col);
    byte_t s0, s1, s2, s3;
    {s0, s1, s2, s3} = col;
    return {gf_mul(s0, 8'h0e) ^ gf_mul(s1, 8'h0b) ^ gf_mul(s2, 8'h0d) ^ gf_mul(s3, 8'h09),
            gf_mul(s0, 8'h09) ^ gf_mul(s1, 8'h0e) ^ gf_mul(s2, 8'h0b) ^ gf_mul(s3, 8'h0d),
            gf_mul(s0, 8'h0d) ^ gf_mul(s1, 8'h09) ^ gf_mul(s2, 8'h0e) ^ gf_mul(s3, 8'h0b),
            gf_mul(s0, 8'h0b) ^ gf_mul(s1, 8'h0d) ^ gf_mul(s2, 8'h09) ^ gf_mul(s3, 8'h0e)};
  endfunction

  function automatic block_t mix_columns(block_t s);
    return {mix_column(s[127:96]), mix_column(s[95:64]),
            mix_column(s[63:32]),  mix_column(s[31:0])};
  endfunction

  function automatic block_t inv_mix_columns(block_t s);
    return {inv_mix_column(s[127:96]), inv_mix_column(s[95:64]),
            inv_mix_column(s[63:32]),  inv_mix_column(s[31:0])};
  endfunction

  // Round constant for key-expansion round r (1..10), in the top byte.
  function automatic logic [31:0] rcon(int unsigned r);
    byte_t v;
    v = 8'h01;
    for (int unsigned i = 1; i < r; i++) v = xtime(v);
    return {v, 24'h0};
  endfunction

endpackage
