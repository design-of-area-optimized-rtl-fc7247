// mix_columns: the MixColumns transformation with a shared-XOR network.
//
// Each column (a0..a3, a0 in row 0) is multiplied by c(x) = {03}x^3 + {01}x^2 +
// {01}x + {02} modulo x^4 + 1, i.e.
//   b0 = {02}a0 ^ {03}a1 ^ a2 ^ a3   (and rotations for b1..b3).
// Instead of four general multipliers per output, the column is rewritten as
//   t  = a0 ^ a1 ^ a2 ^ a3
//   bi = ai ^ t ^ {02}(ai ^ a(i+1))
// so a column needs only four {02} multipliers (xtime) and XOR gates, and no
// register holds an intermediate product: the reduced-area MixColumns the
// design is built around. Interface: d (state in), q (state out).
// Combinational.
module mix_columns
  import aes_pkg::*;
(
  input  block_t d,
  output block_t q
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a [4];
    byte_t x [4];
    byte_t t;

    for (genvar r = 0; r < 4; r++) begin : g_row
      assign a[r] = d[127 - 8*(4*c + r) -: 8];
      xtime u_xtime (.a(a[r] ^ a[(r+1)%4]), .y(x[r]));
      assign q[127 - 8*(4*c + r) -: 8] = a[r] ^ t ^ x[r];
    end
    assign t = a[0] ^ a[1] ^ a[2] ^ a[3];
  end
endmodule
