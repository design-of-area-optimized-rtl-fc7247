// inv_mix_columns: the InvMixColumns transformation.
//
// Each column (a0..a3, a0 in row 0) is multiplied by d(x) = {0B}x^3 + {0D}x^2 +
// {09}x + {0E} modulo x^4 + 1:
//   b0 = {0E}a0 ^ {0B}a1 ^ {0D}a2 ^ {09}a3   (rotations for b1..b3).
// Every product is a gf_mul_const instance, a fixed XOR network, so the
// transformation holds no general multiplier and no storage; synthesis shares
// the doubled operands that the sixteen products of a column have in common.
// Interface: d (state in), q (state out). Combinational.
module inv_mix_columns
  import aes_pkg::*;
(
  input  block_t d,
  output block_t q
);
  // Coefficient applied to input row (r + j) % 4 for output row r.
  localparam byte_t COEF [4] = '{8'h0E, 8'h0B, 8'h0D, 8'h09};

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a [4];
    for (genvar r = 0; r < 4; r++) begin : g_in
      assign a[r] = d[127 - 8*(4*c + r) -: 8];
    end

    for (genvar r = 0; r < 4; r++) begin : g_out
      byte_t p [4];
      for (genvar j = 0; j < 4; j++) begin : g_term
        gf_mul_const #(.COEF(COEF[j])) u_mul (.a(a[(r+j)%4]), .y(p[j]));
      end
      assign q[127 - 8*(4*c + r) -: 8] = p[0] ^ p[1] ^ p[2] ^ p[3];
    end
  end
endmodule
