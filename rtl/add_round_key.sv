// add_round_key: the AddRoundKey transformation.
//
// Bitwise XOR of the 128-bit state with the 128-bit round key. XOR is its own
// inverse, so the same block serves encryption and decryption; decryption only
// reads the round keys in reverse order. Interface: d (state), k (round key),
// q (state out). Combinational.
module add_round_key
  import aes_pkg::*;
(
  input  block_t d,
  input  block_t k,
  output block_t q
);
  assign q = d ^ k;
endmodule
