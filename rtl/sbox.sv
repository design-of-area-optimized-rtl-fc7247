// sbox: the AES forward S-box (SubBytes substitution of one byte).
//
// A 256 x 8 read-only table addressed by the input byte, so the substitution
// completes in the same clock cycle as the rest of the round. Using a stored
// table instead of a multiplicative-inverse circuit plus affine map is the
// design's choice; the table contents are generated at elaboration by
// aes_pkg::sbox_table() from the S-box definition rather than typed in.
// Interface: a (byte in), y (substituted byte). Purely combinational.
module sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);
  localparam byte_table_t TABLE = sbox_table();

  assign y = TABLE[a];
endmodule
