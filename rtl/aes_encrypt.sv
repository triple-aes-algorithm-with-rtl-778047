// aes_encrypt: iterative AES-128 encryption engine, one round per clock.
//
// Flow: Stage 1 XORs the plain text with round key 0 (the cipher key);
// Stage 2 runs 9 main rounds of SubBytes, ShiftRows, MixColumns and
// AddRoundKey with round keys 1..9; Stage 3 is the final round, the same but
// without MixColumns, with round key 10. A single round datapath is reused
// for all 10 rounds (MixColumns is bypassed in round 10), and the round keys
// come from a key_expansion instance that runs first.
//
// Interface: a one-cycle start (ignored while busy) samples block_in and
// key. done pulses for one cycle 21 cycles later (10 key-expansion cycles,
// 1 initial AddRoundKey, 10 rounds); block_out then holds the cipher text
// until the next start. The stage structure follows the design description;
// the iterative timing and the handshake are this design's choice.
module aes_encrypt
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t block_in,
  input  block_t key,
  output logic   busy,
  output logic   done,
  output block_t block_out
);
  typedef enum logic [1:0] {S_IDLE, S_KEYEXP, S_ROUND} state_e;

  state_e      st_q;
  logic [3:0]  round_q;
  block_t      state_q;
  logic        kx_ready;
  round_keys_t rk;
  block_t      sb_out, sr_out, mc_out, ark_in, ark_out, round_key;

  key_expansion u_kx (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start && st_q == S_IDLE),
    .key       (key),
    .ready     (kx_ready),
    .round_keys(rk)
  );

  sub_bytes   u_sb (.state_in(state_q), .state_out(sb_out));
  shift_rows  u_sr (.state_in(sb_out),  .state_out(sr_out));
  mix_columns u_mc (.state_in(sr_out),  .state_out(mc_out));

  // Stage 1 adds key 0 to the raw state; rounds add key `round`.
  always_comb begin
    if (st_q == S_KEYEXP) begin
      ark_in    = state_q;
      round_key = rk[0];
    end else begin
      ark_in    = (round_q == 4'(NUM_ROUNDS)) ? sr_out : mc_out;
      round_key = rk[round_q];
    end
  end

  add_round_key u_ark (.state_in(ark_in), .round_key(round_key), .state_out(ark_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      round_q <= '0;
      state_q <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          state_q <= block_in;
          st_q    <= S_KEYEXP;
        end
        S_KEYEXP: if (kx_ready) begin
          state_q <= ark_out;
          round_q <= 4'd1;
          st_q    <= S_ROUND;
        end
        S_ROUND: begin
          state_q <= ark_out;
          if (round_q == 4'(NUM_ROUNDS)) begin
            round_q <= '0;
            done    <= 1'b1;
            st_q    <= S_IDLE;
          end else begin
            round_q <= round_q + 4'd1;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign busy      = (st_q != S_IDLE);
  assign block_out = state_q;
endmodule
