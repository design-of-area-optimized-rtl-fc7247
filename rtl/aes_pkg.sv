// aes_pkg: types and constants shared by the AES-128 modules.
//
// The 128-bit state follows the FIPS-197 byte order: byte i of a block sits in
// bits [127-8*i -: 8], and byte i is state row (i % 4), column (i / 4). The
// helpers byte_at/set_byte hide that mapping from the transformation modules.
//
// The S-box and inverse S-box are pre-calculated tables, as the design asks,
// but the 256 entries are not typed in: the constant functions below compute
// them at elaboration from the S-box definition (multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1, followed by the affine map with constant
// {63}). The hardware that results is a plain 256 x 8 ROM lookup per byte.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [255:0][7:0] byte_table_t;

  // Operation of the cipher core, sampled with start.
  typedef enum logic {
    MODE_ENC = 1'b0,
    MODE_DEC = 1'b1
  } aes_mode_e;

  // AES-128 (Nk = 4 key words, Nb = 4 block words): Nr = 10 rounds.
  localparam int unsigned NR = 10;

  function automatic byte_t byte_at(block_t b, int unsigned i);
    return b[127-8*i -: 8];
  endfunction

  // {02} * a in GF(2^8)
  function automatic byte_t gf_xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Full GF(2^8) product, shift-and-add; used only at elaboration.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = gf_xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 ({00} maps to {00}).
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t sbox_entry(byte_t a);
    byte_t b = gf_inv(a);
    byte_t s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic byte_table_t sbox_table();
    byte_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_entry(byte_t'(i));
    return t;
  endfunction

  // The inverse table is the forward one read backwards.
  function automatic byte_table_t inv_sbox_table();
    byte_table_t f = sbox_table();
    byte_table_t t;
    for (int i = 0; i < 256; i++) t[f[i]] = byte_t'(i);
    return t;
  endfunction

endpackage
