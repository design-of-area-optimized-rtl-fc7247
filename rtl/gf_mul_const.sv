// gf_mul_const: multiplier by a fixed coefficient in GF(2^8).
//
// Used by InvMixColumns for the coefficients {0E}, {0B}, {0D} and {09}. The
// input is doubled three times (a, 2a, 4a, 8a, each step an xtime network) and
// the multiples selected by the coefficient's bits are XORed together, so the
// whole multiplier is a fixed XOR network with no general multiplier and no
// storage. COEF must be below {10} (the top four bits are ignored).
// Interface: a (byte in), y = COEF*a. Combinational.
module gf_mul_const
  import aes_pkg::*;
#(
  parameter byte_t COEF = 8'h0D
) (
  input  byte_t a,
  output byte_t y
);
  byte_t m [4];   // m[k] = {02}^k * a

  assign m[0] = a;
  for (genvar k = 1; k < 4; k++) begin : g_dbl
    xtime u_xtime (.a(m[k-1]), .y(m[k]));
  end

  always_comb begin
    y = 8'h00;
    for (int k = 0; k < 4; k++)
      if (COEF[k]) y ^= m[k];
  end
endmodule
