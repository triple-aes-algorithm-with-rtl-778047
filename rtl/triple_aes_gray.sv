// triple_aes_gray: Triple AES with gray-code encrypted keys, sender and
// receiver side by side.
//
// The sender side (triple_aes_encrypt) encrypts the 128-bit plain text as
// E_key1(D_key2(E_key1(pt))) and produces the gray-coded forms of key1 and
// key2. The receiver side (triple_aes_decrypt) takes the cipher text and the
// gray-coded keys, converts the keys back to binary and decrypts as
// D_key1(E_key2(D_key1(ct))), which gives the plain text back. The top runs
// one complete operation per start: encryption, then decryption of its
// result.
//
// Interface: start (ignored while busy) samples plaintext_in, key1, key2.
// cipher_valid pulses 66 cycles later, with ciphertext, gray_key1 and
// gray_key2 valid from then on; done pulses 67 cycles after that
// (133 cycles after start) with plaintext_out, equal to plaintext_in.
// Outputs hold until the next start. The chaining of the two sides follows
// the signal set of the design description; the handshake is this design's
// choice.
module triple_aes_gray
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t plaintext_in,
  input  block_t key1,
  input  block_t key2,
  output logic   busy,
  output logic   cipher_valid,
  output block_t ciphertext,
  output block_t gray_key1,
  output block_t gray_key2,
  output logic   done,
  output block_t plaintext_out
);
  logic enc_busy, dec_busy;

  triple_aes_encrypt u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start && !busy),
    .plaintext (plaintext_in),
    .key1      (key1),
    .key2      (key2),
    .busy      (enc_busy),
    .done      (cipher_valid),
    .ciphertext(ciphertext),
    .gray_key1 (gray_key1),
    .gray_key2 (gray_key2)
  );

  triple_aes_decrypt u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (cipher_valid),
    .ciphertext(ciphertext),
    .gray_key1 (gray_key1),
    .gray_key2 (gray_key2),
    .busy      (dec_busy),
    .done      (done),
    .plaintext (plaintext_out)
  );

  assign busy = enc_busy || dec_busy;
endmodule
