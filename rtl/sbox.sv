// sbox: AES forward S-box computed with GF(2^8) logic, no lookup table.
//
// out = affine(in^-1), with the inverse taken as in^254: four GF(2^8)
// multipliers and seven squarings, which are plain XOR networks
// (aes_pkg::gf_inv). Purely combinational, one byte.
// Computing the substitution with field logic rather than a stored table
// follows the design description; the x^254 addition chain is this design's choice of
// how to compute the inverse.
module sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);
  always_comb out_byte = affine(gf_inv(in_byte));
endmodule
