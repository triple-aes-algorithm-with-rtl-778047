// mix_columns: AES MixColumns step.
//
// Each column (a0..a3, top to bottom) is multiplied over GF(2^8) by the
// circulant matrix [02 03 01 01]:
//   b_i = 02*a_i ^ 03*a_(i+1) ^ a_(i+2) ^ a_(i+3)   (indices mod 4)
// built from xtime (multiply by 02) and XOR. Combinational.
//
// The step is named in the design description, which also leaves it out of
// the final round; its definition is the standard AES one.
module mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      for (int r = 0; r < 4; r++) a[r] = state_in[127 - 8*(r + 4*c) -: 8];
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(r + 4*c) -: 8] =
            xtime(a[r]) ^ xtime(a[(r+1)%4]) ^ a[(r+1)%4] ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
  end
endmodule
