// key_expand_round: one step of the AES-128 KeyExpansion.
//
// From round key i-1 (words w0..w3, w0 in bits 127:96) and the round constant
// of step i, it forms round key i:
//   tmp = SubWord(RotWord(w3)) ^ {rcon, 00, 00, 00}
//   n0 = w0 ^ tmp,  n1 = w1 ^ n0,  n2 = w2 ^ n1,  n3 = w3 ^ n2
// SubWord uses four sbox instances. The step follows FIPS-197; the key
// scheduler calls it once per clock. Interface: key_in, rc (round constant),
// key_out. Combinational.
module key_expand_round
  import aes_pkg::*;
(
  input  block_t key_in,
  input  byte_t  rc,
  output block_t key_out
);
  word_t w [4];
  word_t n [4];
  word_t rot;
  word_t sub;

  for (genvar i = 0; i < 4; i++) begin : g_word
    assign w[i] = key_in[127 - 32*i -: 32];
    assign key_out[127 - 32*i -: 32] = n[i];
  end

  assign rot = {w[3][23:0], w[3][31:24]};
  for (genvar b = 0; b < 4; b++) begin : g_sub
    sbox u_sbox (.a(rot[8*b +: 8]), .y(sub[8*b +: 8]));
  end

  always_comb begin
    n[0] = w[0] ^ sub ^ {rc, 24'h0};
    for (int i = 1; i < 4; i++) n[i] = w[i] ^ n[i-1];
  end
endmodule
