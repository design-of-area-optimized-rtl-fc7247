// sub_bytes: the SubBytes transformation on a whole 128-bit state.
//
// Each of the 16 state bytes goes through its own sbox instance, so the
// transformation takes no clock cycles of its own. Byte order is FIPS-197
// (byte 0 in bits 127:120); since every byte is treated alike, order does not
// matter here. Interface: d (state in), q (state out). Combinational.
module sub_bytes
  import aes_pkg::*;
(
  input  block_t d,
  output block_t q
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    sbox u_sbox (.a(d[8*i +: 8]), .y(q[8*i +: 8]));
  end
endmodule
