// xtime: fixed-coefficient multiplier by {02} in GF(2^8).
//
// The building block of the MixColumns network: a one-bit left shift, with the
// reduction polynomial x^8+x^4+x^3+x+1 folded back in (XOR with {1B}) when the
// bit shifted out is set. That is three XOR gates and no multiplier.
// Interface: a (byte in), y = {02}*a. Combinational.
module xtime
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t y
);
  always_comb begin
    y    = {a[6:0], 1'b0};
    y[0] = a[7];
    y[1] = a[0] ^ a[7];
    y[3] = a[2] ^ a[7];
    y[4] = a[3] ^ a[7];
  end
endmodule
