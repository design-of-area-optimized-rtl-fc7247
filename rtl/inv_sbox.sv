// inv_sbox: the AES inverse S-box (InvSubBytes substitution of one byte).
//
// A 256 x 8 read-only table addressed by the input byte, the inverse of sbox:
// inv_sbox(sbox(a)) == a. As with the forward table, it is a pre-calculated
// lookup; its contents are produced at elaboration by
// aes_pkg::inv_sbox_table(), which inverts the forward table.
// Interface: a (byte in), y (substituted byte). Purely combinational.
module inv_sbox
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);
  localparam byte_table_t TABLE = inv_sbox_table();

  assign y = TABLE[a];
endmodule
