// aes_ref_pkg: a behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL: the state is a 4 x 4 byte matrix, the
// S-box is found by searching for the multiplicative inverse and applying the
// affine map bit by bit, and every GF(2^8) product is a general shift-and-add
// multiply. The model itself is checked against the FIPS-197 known answers
// held below before the testbenches trust it.
package aes_ref_pkg;

  typedef logic [7:0] b8_t;
  typedef b8_t mat_t [4][4];       // [row][column]

  // FIPS-197 Appendix B and Appendix C.1 examples.
  localparam logic [127:0] FIPS_B_KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] FIPS_B_PT  = 128'h3243f6a8885a308d313198a2e0370734;
  localparam logic [127:0] FIPS_B_CT  = 128'h3925841d02dc09fbdc118597196a0b32;
  localparam logic [127:0] FIPS_C_KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam logic [127:0] FIPS_C_PT  = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] FIPS_C_CT  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
  // Last round key of the Appendix A.1 expansion of FIPS_B_KEY.
  localparam logic [127:0] FIPS_A_RK10 = 128'hd014f9a8c9ee2589e13f0cc8b6630ca6;

  function automatic b8_t gmul(b8_t a, b8_t b);
    b8_t p = 0;
    b8_t aa = a;
    b8_t bb = b;
    while (bb != 0) begin
      if (bb[0]) p ^= aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1b) : (aa << 1);
      bb = bb >> 1;
    end
    return p;
  endfunction

  function automatic b8_t sbox_compute(b8_t a);
    b8_t inv = 0;
    b8_t s;
    for (int c = 1; c < 256; c++)
      if (gmul(a, b8_t'(c)) == 8'h01) inv = b8_t'(c);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  // Tables filled on first use, the inverse by searching the forward one.
  b8_t sb_cache  [256];
  b8_t isb_cache [256];
  bit  cache_ok = 1'b0;

  function automatic void fill_cache();
    if (cache_ok) return;
    for (int a = 0; a < 256; a++) sb_cache[a] = sbox_compute(b8_t'(a));
    for (int y = 0; y < 256; y++)
      for (int a = 0; a < 256; a++)
        if (sb_cache[a] == b8_t'(y)) isb_cache[y] = b8_t'(a);
    cache_ok = 1'b1;
  endfunction

  function automatic b8_t ref_sbox(b8_t a);
    fill_cache();
    return sb_cache[a];
  endfunction

  function automatic b8_t ref_inv_sbox(b8_t y);
    fill_cache();
    return isb_cache[y];
  endfunction

  function automatic mat_t to_mat(logic [127:0] v);
    mat_t m;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        m[r][c] = v[127 - 8*(4*c + r) -: 8];
    return m;
  endfunction

  function automatic logic [127:0] from_mat(mat_t m);
    logic [127:0] v;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        v[127 - 8*(4*c + r) -: 8] = m[r][c];
    return v;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] v, bit inv);
    mat_t m = to_mat(v);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        m[r][c] = inv ? ref_inv_sbox(m[r][c]) : ref_sbox(m[r][c]);
    return from_mat(m);
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] v, bit inv);
    mat_t m = to_mat(v);
    mat_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inv) o[r][(c + r) % 4] = m[r][c];
        else     o[r][c] = m[r][(c + r) % 4];
    return from_mat(o);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] v, bit inv);
    mat_t m = to_mat(v);
    mat_t o;
    b8_t k [4];
    if (inv) k = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else     k = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 0;
        for (int j = 0; j < 4; j++) o[r][c] ^= gmul(k[(j - r + 4) % 4], m[j][c]);
      end
    return from_mat(o);
  endfunction

  // Word-based KeyExpansion (FIPS-197 section 5.2), all 11 round keys.
  function automatic void ref_expand(logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    logic [31:0] t;
    b8_t rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] key, logic [127:0] pt);
    logic [127:0] rk [11];
    logic [127:0] s;
    ref_expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s, 0), 0);
      if (r != 10) s = ref_mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt(logic [127:0] key, logic [127:0] ct);
    logic [127:0] rk [11];
    logic [127:0] s;
    ref_expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = ref_sub_bytes(ref_shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = ref_mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
