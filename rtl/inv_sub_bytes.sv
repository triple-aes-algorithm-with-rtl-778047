// inv_sub_bytes: AES InvSubBytes step, the inverse S-box on all 16 bytes.
//
// Sixteen parallel inv_sbox instances (inverse affine, then GF(2^8)
// inversion). Combinational; byte order as in aes_pkg.
//
// Substitution by field logic instead of a table follows the design
// description; the parallel, unregistered arrangement is this design's choice.
module inv_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    inv_sbox u_inv_sbox (
      .in_byte (state_in [8*i +: 8]),
      .out_byte(state_out[8*i +: 8])
    );
  end
endmodule
