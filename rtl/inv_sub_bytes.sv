// inv_sub_bytes: the InvSubBytes transformation on a whole 128-bit state.
//
// Sixteen inv_sbox instances, one per state byte, working in parallel.
// Interface: d (state in), q (state out). Combinational.
module inv_sub_bytes
  import aes_pkg::*;
(
  input  block_t d,
  output block_t q
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    inv_sbox u_inv_sbox (.a(d[8*i +: 8]), .y(q[8*i +: 8]));
  end
endmodule
