// inv_sbox: AES inverse S-box computed with GF(2^8) logic, no lookup table.
//
// out = (inv_affine(in))^-1, the inverse again as x^254 (aes_pkg::gf_inv).
// Purely combinational, one byte.
//
// Field logic instead of a table follows the design description; the x^254
// addition chain is this design's choice.
module inv_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);
  always_comb out_byte = gf_inv(inv_affine(in_byte));
endmodule
