// aes_shift_row -- ShiftRow: row r of the 4x4 byte state is rotated left by
// r positions (r = 0..3), the standard offsets for a 128-bit block.
//
// Only the order of the sixteen bytes changes, so this is pure wiring:
// output byte (r, c) is input byte (r, (c + r) mod 4). Combinational.
// Routing only, no logic, as in the original architecture; the offsets are
// those of the AES standard.
module aes_shift_row (
  input  aes_pkg::block_t d,
  output aes_pkg::block_t q
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign q[127-8*(r+4*c) -: 8] = d[127-8*(r+4*((c+r)%4)) -: 8];
    end
  end
endmodule
