// sub_bytes: AES SubBytes step, the S-box applied to all 16 state bytes.
//
// Sixteen parallel sbox instances, each computing the substitution with
// GF(2^8) inversion and affine logic rather than a table. Combinational,
// 128-bit state in, 128-bit state out; byte order as in aes_pkg.
//
// Substitution by field logic instead of a table follows the design
// description; the parallel, unregistered arrangement is this design's choice.
module sub_bytes
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    sbox u_sbox (
      .in_byte (state_in [8*i +: 8]),
      .out_byte(state_out[8*i +: 8])
    );
  end
endmodule
