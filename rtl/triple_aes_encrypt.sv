// triple_aes_encrypt: Advanced Triple Encryption with gray-coded key output.
//
// The plain text goes through three AES-128 engines in sequence:
//   ciphertext = E_key1( D_key2( E_key1(plaintext) ) )
// (encrypt, decrypt with a different key, encrypt again with the first key).
// Alongside, both keys are converted from binary to gray code; the gray
// words are the protected form of the keys handed to the receiving side,
// whose triple decryption unit converts them back before use.
//
// Interface: start (ignored while busy) samples plaintext, key1 and key2
// into registers; each stage starts on the previous stage's done. done
// pulses once, 66 cycles after start (1 + 3 x (21 + 1)), and ciphertext, gray_key1
// and gray_key2 are valid from then until the next start. The E-D-E order
// and the two keys follow the design description; where the gray-coded key
// enters (here: handed on, while the AES engines use the binary key) is this
// design's reading, chosen so that the decryption side recovers the text.
module triple_aes_encrypt
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t plaintext,
  input  block_t key1,
  input  block_t key2,
  output logic   busy,
  output logic   done,
  output block_t ciphertext,
  output block_t gray_key1,
  output block_t gray_key2
);
  block_t key1_q, key2_q, pt_q;
  logic   busy_q;
  logic   go;
  logic   s1_done, s2_done, s3_done;
  logic   s1_busy, s2_busy, s3_busy;
  block_t s1_out, s2_out;

  assign go = start && !busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      key1_q <= '0;
      key2_q <= '0;
      pt_q   <= '0;
    end else begin
      if (go) begin
        busy_q <= 1'b1;
        key1_q <= key1;
        key2_q <= key2;
        pt_q   <= plaintext;
      end else if (s3_done) begin
        busy_q <= 1'b0;
      end
    end
  end

  // The first stage starts one cycle after go, from the registered inputs.
  logic go_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) go_d <= 1'b0;
    else        go_d <= go;
  end

  aes_encrypt u_stage1 (
    .clk(clk), .rst_n(rst_n), .start(go_d), .block_in(pt_q), .key(key1_q),
    .busy(s1_busy), .done(s1_done), .block_out(s1_out)
  );
  aes_decrypt u_stage2 (
    .clk(clk), .rst_n(rst_n), .start(s1_done), .block_in(s1_out), .key(key2_q),
    .busy(s2_busy), .done(s2_done), .block_out(s2_out)
  );
  aes_encrypt u_stage3 (
    .clk(clk), .rst_n(rst_n), .start(s2_done), .block_in(s2_out), .key(key1_q),
    .busy(s3_busy), .done(s3_done), .block_out(ciphertext)
  );

  gray_encoder #(.WIDTH(128)) u_gray1 (.bin_in(key1_q), .gray_out(gray_key1));
  gray_encoder #(.WIDTH(128)) u_gray2 (.bin_in(key2_q), .gray_out(gray_key2));

  assign busy = busy_q;
  assign done = s3_done;

  // At most one stage is active at a time.
  always_comb begin
    if (rst_n) begin
      a_one_stage: assert ($onehot0({s1_busy, s2_busy, s3_busy}))
        else $error("more than one AES stage active");
    end
  end
endmodule
