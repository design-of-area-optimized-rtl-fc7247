// inv_shift_rows: the InvShiftRows transformation.
//
// Row r of the state is rotated cyclically right by r bytes, undoing
// shift_rows: output byte (r, c) takes input byte (r, (c - r) mod 4).
// Wiring only. Interface: d (state in), q (state out).
module inv_shift_rows
  import aes_pkg::*;
(
  input  block_t d,
  output block_t q
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign q[127 - 8*(4*c + r) -: 8] = d[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8];
    end
  end
endmodule
