// aes_pkg: types and GF(2^8) arithmetic shared by the AES-128 datapath.
//
// A 128-bit AES block is held MSB-first: bits [127:120] are byte 0 and the
// 4x4 state is filled column by column, so state byte (row r, column c) is
// byte index r + 4*c. Field arithmetic is over GF(2^8) modulo the AES
// polynomial x^8 + x^4 + x^3 + x + 1 (0x11b). The S-box inverse is computed
// here with logic (x^254 through an addition chain) instead of a stored table.
//
// The S-box built from field logic follows the design description; the
// byte order is that of the AES standard, and the arithmetic is this design's
// choice of how to build it.
package aes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;

  localparam int unsigned NUM_ROUNDS = 10;  // AES-128: 9 main rounds + final round
  localparam int unsigned NUM_RKEYS  = NUM_ROUNDS + 1;

  // Round keys 0 (the cipher key) to 10, index k at [k].
  typedef block_t [NUM_RKEYS-1:0] round_keys_t;

  // Byte index b (0 = most significant) of a block.
  function automatic byte_t get_byte(block_t b, int unsigned idx);
    return b[127 - 8*idx -: 8];
  endfunction

  // Multiply by x (02) in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ ({8{a[7]}} & 8'h1b);
  endfunction

  // Reduce a polynomial of degree <= 14 modulo 0x11b.
  function automatic byte_t gf_reduce(logic [14:0] t);
    logic [14:0] r;
    r = t;
    for (int k = 14; k >= 8; k--)
      r = r ^ ({15{r[k]}} & (15'h11b << (k - 8)));
    return r[7:0];
  endfunction

  // General GF(2^8) product: carry-less 8x8 multiply, then reduction.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    logic [14:0] t;
    t = '0;
    for (int i = 0; i < 8; i++)
      t = t ^ ({15{b[i]}} & (15'(a) << i));
    return gf_reduce(t);
  endfunction

  // Squaring is linear over GF(2): spread the bits, then reduce.
  function automatic byte_t gf_sq(byte_t a);
    logic [14:0] t;
    t = '0;
    for (int i = 0; i < 8; i++) t[2*i] = a[i];
    return gf_reduce(t);
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0), with an addition chain of
  // four general products and linear squarings:
  //   a^3 = a^2*a, a^15 = a^12*a^3, a^252 = a^240*a^12, a^254 = a^252*a^2
  function automatic byte_t gf_inv(byte_t a);
    byte_t a2, a3, a12, a15, a240, a252;
    a2   = gf_sq(a);
    a3   = gf_mul(a2, a);
    a12  = gf_sq(gf_sq(a3));
    a15  = gf_mul(a12, a3);
    a240 = gf_sq(gf_sq(gf_sq(gf_sq(a15))));
    a252 = gf_mul(a240, a12);
    return gf_mul(a252, a2);
  endfunction

  // AES affine transform: b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 0x63.
  function automatic byte_t affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  // Inverse affine transform: b_i ^ b_(i+2) ^ b_(i+5) ^ b_(i+7) ^ d_i, d = 0x05.
  function automatic byte_t inv_affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[(i+2)%8] ^ b[(i+5)%8] ^ b[(i+7)%8];
    return r ^ 8'h05;
  endfunction

endpackage
