// aes_decrypt: iterative AES-128 decryption engine, one round per clock.
//
// Each round applies InvSubBytes, InvShiftRows, InvMixColumns and then
// AddRoundKey, in that order; the final round leaves out InvMixColumns. With
// this order the result is the inverse of aes_encrypt when the round keys are
// used last to first and keys 9..1 are first passed through InvMixColumns
// (the "equivalent inverse cipher" of the AES standard):
//   initial: state ^ rk[10]
//   round r = 1..9: ARK(IMC(ISR(ISB(state))), IMC(rk[10-r]))
//   round 10:        ARK(ISR(ISB(state)), rk[0])
// One round datapath is reused; a second inv_mix_columns instance transforms
// the round key on the fly. Keys come from a key_expansion instance.
//
// Interface and timing as aes_encrypt: start samples block_in and key, done
// pulses 21 cycles later and block_out holds the plain text. The order of
// the steps follows the design description; the key transform, the
// iterative timing and the handshake are this design's choice.
module aes_decrypt
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
  block_t      isb_out, isr_out, imc_out, ark_in, ark_out;
  block_t      raw_key, imc_key, round_key;
  logic [3:0]  key_idx;

  key_expansion u_kx (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start && st_q == S_IDLE),
    .key       (key),
    .ready     (kx_ready),
    .round_keys(rk)
  );

  inv_sub_bytes   u_isb (.state_in(state_q), .state_out(isb_out));
  inv_shift_rows  u_isr (.state_in(isb_out), .state_out(isr_out));
  inv_mix_columns u_imc (.state_in(isr_out), .state_out(imc_out));

  // Round key in reverse order; keys of the main rounds go through IMC.
  assign key_idx = (st_q == S_KEYEXP) ? 4'(NUM_ROUNDS) : 4'(NUM_ROUNDS) - round_q;
  assign raw_key = rk[key_idx];
  inv_mix_columns u_imc_key (.state_in(raw_key), .state_out(imc_key));

  always_comb begin
    if (st_q == S_KEYEXP) begin
      ark_in    = state_q;
      round_key = raw_key;
    end else if (round_q == 4'(NUM_ROUNDS)) begin
      ark_in    = isr_out;
      round_key = raw_key;
    end else begin
      ark_in    = imc_out;
      round_key = imc_key;
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
