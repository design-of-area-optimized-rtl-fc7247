// shift_rows: the ShiftRows transformation.
//
// Row r of the 4 x 4 state is rotated cyclically left by r bytes (row 0 stays,
// row 3 moves by three). With FIPS-197 byte order (byte i is row i%4, column
// i/4) output byte (r, c) takes input byte (r, (c + r) mod 4). It is wiring
// only: no gates and no clock cycle. Interface: d (state in), q (state out).
module shift_rows
  import aes_pkg::*;
(
  input  block_t d,
  output block_t q
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign q[127 - 8*(4*c + r) -: 8] = d[127 - 8*(4*((c + r) % 4) + r) -: 8];
    end
  end
endmodule
