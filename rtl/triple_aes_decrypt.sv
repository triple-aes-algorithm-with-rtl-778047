// triple_aes_decrypt: Advanced Triple Decryption with gray-coded keys.
//
// The two keys arrive in gray code and are first converted back to binary.
// The cipher text then goes through three AES-128 engines in sequence:
//   plaintext = D_key1( E_key2( D_key1(ciphertext) ) )
// which undoes triple_aes_encrypt stage by stage.
//
// Interface: start (ignored while busy) samples ciphertext and the decoded
// keys into registers; each stage starts on the previous stage's done. done
// pulses once, 66 cycles after start (1 + 3 x (21 + 1)), and plaintext holds the result until
// the next start. The D-E-D order and the gray-to-binary conversion follow
// the design description; the handshake is this design's choice.
module triple_aes_decrypt
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t ciphertext,
  input  block_t gray_key1,
  input  block_t gray_key2,
  output logic   busy,
  output logic   done,
  output block_t plaintext
);
  block_t key1_bin, key2_bin;
  block_t key1_q, key2_q, ct_q;
  logic   busy_q, go, go_d;
  logic   s1_done, s2_done, s3_done;
  logic   s1_busy, s2_busy, s3_busy;
  block_t s1_out, s2_out;

  gray_decoder #(.WIDTH(128)) u_gdec1 (.gray_in(gray_key1), .bin_out(key1_bin));
  gray_decoder #(.WIDTH(128)) u_gdec2 (.gray_in(gray_key2), .bin_out(key2_bin));

  assign go = start && !busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      go_d   <= 1'b0;
      key1_q <= '0;
      key2_q <= '0;
      ct_q   <= '0;
    end else begin
      go_d <= go;
      if (go) begin
        busy_q <= 1'b1;
        key1_q <= key1_bin;
        key2_q <= key2_bin;
        ct_q   <= ciphertext;
      end else if (s3_done) begin
        busy_q <= 1'b0;
      end
    end
  end

  aes_decrypt u_stage1 (
    .clk(clk), .rst_n(rst_n), .start(go_d), .block_in(ct_q), .key(key1_q),
    .busy(s1_busy), .done(s1_done), .block_out(s1_out)
  );
  aes_encrypt u_stage2 (
    .clk(clk), .rst_n(rst_n), .start(s1_done), .block_in(s1_out), .key(key2_q),
    .busy(s2_busy), .done(s2_done), .block_out(s2_out)
  );
  aes_decrypt u_stage3 (
    .clk(clk), .rst_n(rst_n), .start(s2_done), .block_in(s2_out), .key(key1_q),
    .busy(s3_busy), .done(s3_done), .block_out(plaintext)
  );

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
