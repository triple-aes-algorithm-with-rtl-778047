// aes_ref_pkg: reference model for the testbenches.
//
// A plain software-style AES-128 written independently of the RTL: the
// S-box is built once by searching, for every byte, the element whose field
// product with it is 1 (rather than the x^254 chain of the RTL), and
// decryption uses the direct inverse cipher of the AES standard
// (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns) rather than the
// equivalent inverse cipher of the RTL. A testbench calls build_tables()
// once before it uses the model. Also gray code helpers written as bit
// loops, and a 128-bit random helper.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  logic [7:0] sbox_tab     [256];
  logic [7:0] inv_sbox_tab [256];

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic void build_tables();
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv, s;
      inv = 8'h00;
      for (int y = 1; y < 256; y++) if (mul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      s = 8'h63;
      for (int i = 0; i < 8; i++)
        if (inv[i]) s ^= 8'h1f << i | 8'h1f >> (8 - i);   // circulant row of the affine map
      sbox_tab[x] = s;
    end
    for (int x = 0; x < 256; x++) inv_sbox_tab[sbox_tab[x]] = 8'(x);
  endfunction

  // The S-box tables must have been built (build_tables) before these are used.
  function automatic logic [7:0] sb(logic [7:0] x);
    return sbox_tab[x];
  endfunction

  function automatic logic [7:0] isb(logic [7:0] x);
    return inv_sbox_tab[x];
  endfunction

  // state byte (r, c) = byte r + 4c, byte 0 most significant
  function automatic logic [7:0] gb(blk_t s, int r, int c);
    return s[127 - 8*(r + 4*c) -: 8];
  endfunction

  function automatic blk_t shift_rows(blk_t s);
    blk_t o;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      o[127 - 8*(r + 4*c) -: 8] = gb(s, r, (c + r) % 4);
    return o;
  endfunction

  function automatic blk_t inv_shift_rows(blk_t s);
    blk_t o;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      o[127 - 8*(r + 4*c) -: 8] = gb(s, r, (c + 4 - r) % 4);
    return o;
  endfunction

  function automatic blk_t sub_bytes(blk_t s);
    blk_t o;
    for (int i = 0; i < 16; i++) o[8*i +: 8] = sb(s[8*i +: 8]);
    return o;
  endfunction

  function automatic blk_t inv_sub_bytes(blk_t s);
    blk_t o;
    for (int i = 0; i < 16; i++) o[8*i +: 8] = isb(s[8*i +: 8]);
    return o;
  endfunction

  function automatic blk_t mix_cols(blk_t s, logic [7:0] m0, logic [7:0] m1,
                                    logic [7:0] m2, logic [7:0] m3);
    blk_t o;
    logic [7:0] m [4];
    m = '{m0, m1, m2, m3};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] acc;
        acc = 8'h00;
        for (int k = 0; k < 4; k++) acc ^= mul(m[(k - r + 4) % 4], gb(s, k, c));
        o[127 - 8*(r + 4*c) -: 8] = acc;
      end
    return o;
  endfunction

  function automatic blk_t mix_columns(blk_t s);
    return mix_cols(s, 8'h02, 8'h03, 8'h01, 8'h01);
  endfunction

  function automatic blk_t inv_mix_columns(blk_t s);
    return mix_cols(s, 8'h0e, 8'h0b, 8'h0d, 8'h09);
  endfunction

  typedef blk_t rk_t [11];

  // All eleven round keys of a cipher key (the 44-word schedule).
  function automatic rk_t expand(blk_t key);
    logic [31:0] w [44];
    logic [7:0]  rc;
    rk_t         rk;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t;
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb(t[31:24]), sb(t[23:16]), sb(t[15:8]), sb(t[7:0])} ^ {rc, 24'h0};
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int k = 0; k < 11; k++) rk[k] = {w[4*k], w[4*k+1], w[4*k+2], w[4*k+3]};
    return rk;
  endfunction

  function automatic blk_t round_key(blk_t key, int k);
    rk_t rk;
    rk = expand(key);
    return rk[k];
  endfunction

  function automatic blk_t encrypt(blk_t pt, blk_t key);
    blk_t s;
    rk_t  rk;
    rk = expand(key);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s));
      if (r < 10) s = mix_columns(s);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic blk_t decrypt(blk_t ct, blk_t key);
    blk_t s;
    rk_t  rk;
    rk = expand(key);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = inv_sub_bytes(inv_shift_rows(s));
      s ^= rk[r];
      if (r > 0) s = inv_mix_columns(s);
    end
    return s;
  endfunction

  function automatic blk_t to_gray(blk_t b);
    blk_t g;
    g[127] = b[127];
    for (int i = 0; i < 127; i++) g[i] = b[i] ^ b[i+1];
    return g;
  endfunction

  function automatic blk_t from_gray(blk_t g);
    blk_t b;
    for (int i = 0; i < 128; i++) begin
      b[i] = 1'b0;
      for (int j = i; j < 128; j++) b[i] ^= g[j];
    end
    return b;
  endfunction

  function automatic blk_t rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
