// shift_rows: AES ShiftRows step.
//
// Row r of the 4x4 byte state is rotated left by r columns:
// out(r, c) = in(r, (c + r) mod 4). Row 0 is unchanged. Byte (r, c) sits at
// byte index r + 4c, MSB first (aes_pkg). Combinational, a fixed byte
// permutation with no logic gates.
//
// The step itself is named in the design description; its definition is the
// standard AES one.
module shift_rows
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        state_out[127 - 8*(r + 4*c) -: 8] = state_in[127 - 8*(r + 4*((c + r) % 4)) -: 8];
  end
endmodule
