// inv_shift_rows: AES InvShiftRows step, the inverse of shift_rows.
//
// Row r is rotated right by r columns: out(r, (c + r) mod 4) = in(r, c).
// Combinational byte permutation; byte order as in aes_pkg.
//
// The step is named in the design description; its definition is the
// standard AES one.
module inv_shift_rows
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        state_out[127 - 8*(r + 4*((c + r) % 4)) -: 8] = state_in[127 - 8*(r + 4*c) -: 8];
  end
endmodule
