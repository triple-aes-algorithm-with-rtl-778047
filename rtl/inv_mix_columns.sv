// inv_mix_columns: AES InvMixColumns step, the inverse of mix_columns.
//
// Each column is multiplied over GF(2^8) by the circulant matrix
// [0e 0b 0d 09]:
//   b_i = 0e*a_i ^ 0b*a_(i+1) ^ 0d*a_(i+2) ^ 09*a_(i+3)   (indices mod 4)
// The constant products are built from repeated xtime. Combinational.
//
// The step is named in the design description; its definition is the
// standard AES one. aes_decrypt also uses it to transform round keys.
module inv_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a  [4];
      byte_t x2 [4];
      byte_t x4 [4];
      byte_t x8 [4];
      for (int r = 0; r < 4; r++) begin
        a[r]  = state_in[127 - 8*(r + 4*c) -: 8];
        x2[r] = xtime(a[r]);
        x4[r] = xtime(x2[r]);
        x8[r] = xtime(x4[r]);
      end
      // 0e = 8+4+2, 0b = 8+2+1, 0d = 8+4+1, 09 = 8+1
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(r + 4*c) -: 8] =
            (x8[r]       ^ x4[r]       ^ x2[r])       ^
            (x8[(r+1)%4] ^ x2[(r+1)%4] ^ a[(r+1)%4])  ^
            (x8[(r+2)%4] ^ x4[(r+2)%4] ^ a[(r+2)%4])  ^
            (x8[(r+3)%4] ^ a[(r+3)%4]);
    end
  end
endmodule
