// key_expansion: AES-128 key schedule, 4 key words expanded to 44 words.
//
// On start the cipher key is stored as round key 0. On each of the next 10
// clocks one further round key is made from the previous one:
//   t  = SubWord(RotWord(w3)) ^ {Rcon, 24'h0}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
// and written into an 11 x 128-bit register file, so that both the
// encryption (keys 0..10) and the decryption (keys 10..0) engines can read
// any round key afterwards. Rcon starts at 01 and is doubled in GF(2^8) each
// step (01, 02, ..., 80, 1b, 36), so no constant table is stored.
//
// Interface: start (one cycle, key sampled) -> ready rises 10 cycles later
// and stays high until the next start. A start while busy restarts the
// expansion. The 44-word result follows the design description; the
// one-key-per-clock schedule and the register file are this design's choice.
module key_expansion
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  block_t      key,
  output logic        ready,
  output round_keys_t round_keys
);
  block_t      last_q;     // most recently generated round key
  byte_t       rcon_q;
  logic [3:0]  cnt_q;      // index of the round key being generated
  logic        busy_q;
  word_t       rot_w;
  word_t       sub_w;
  block_t      next_key;

  // RotWord of the last word, then SubWord through four S-boxes.
  assign rot_w = {last_q[23:0], last_q[31:24]};
  for (genvar i = 0; i < 4; i++) begin : g_subword
    sbox u_sbox (.in_byte(rot_w[8*i +: 8]), .out_byte(sub_w[8*i +: 8]));
  end

  always_comb begin
    word_t t;
    t = sub_w ^ {rcon_q, 24'h0};
    next_key[127:96] = last_q[127:96] ^ t;
    next_key[95:64]  = last_q[95:64]  ^ next_key[127:96];
    next_key[63:32]  = last_q[63:32]  ^ next_key[95:64];
    next_key[31:0]   = last_q[31:0]   ^ next_key[63:32];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q     <= 1'b0;
      ready      <= 1'b0;
      cnt_q      <= '0;
      rcon_q     <= 8'h01;
      last_q     <= '0;
      round_keys <= '0;
    end else if (start) begin
      busy_q        <= 1'b1;
      ready         <= 1'b0;
      cnt_q         <= 4'd1;
      rcon_q        <= 8'h01;
      last_q        <= key;
      round_keys[0] <= key;
    end else if (busy_q) begin
      round_keys[cnt_q] <= next_key;
      last_q            <= next_key;
      rcon_q            <= xtime(rcon_q);
      cnt_q             <= cnt_q + 4'd1;
      if (cnt_q == 4'(NUM_ROUNDS)) begin
        busy_q <= 1'b0;
        ready  <= 1'b1;
      end
    end
  end
endmodule
