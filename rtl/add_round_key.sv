// add_round_key: AES AddRoundKey step.
//
// The 128-bit state is XORed bit by bit with the 128-bit round key, as the
// design description states. Combinational.
module add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);
  assign state_out = state_in ^ round_key;
endmodule
