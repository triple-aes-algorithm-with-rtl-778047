// tb_triple_aes_gray: end-to-end testbench for the triple_aes_gray top,
// at its default (and only) configuration.
//
// Each operation encrypts a plain text under two keys, checks the cipher
// text, the gray-coded keys and the 66-cycle encryption latency, then waits
// for the decryption side and checks that the plain text comes back after
// 133 cycles in all. It counts how often each mechanism happened and fails
// if one never did: triple encryption, gray encoding of the keys, gray
// decoding and triple decryption (text recovered), the equal-keys case
// (reduces to single AES, checked with the AES standard's known answer) and
// a start while busy being ignored.
module tb_triple_aes_gray;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [127:0] pt_in, k1, k2, ct, g1, g2, pt_out;
  logic         busy, cvalid, done;
  int checks = 0, failures = 0;
  int n_enc = 0, n_gray = 0, n_dec = 0, n_equal_keys = 0, n_ignored = 0;

  triple_aes_gray dut (
    .clk(clk), .rst_n(rst_n), .start(start), .plaintext_in(pt_in), .key1(k1), .key2(k2),
    .busy(busy), .cipher_valid(cvalid), .ciphertext(ct), .gray_key1(g1), .gray_key2(g2),
    .done(done), .plaintext_out(pt_out));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] p, logic [127:0] a, logic [127:0] b, bit poke);
    int cycles;
    logic [127:0] exp_ct;
    exp_ct = encrypt(decrypt(encrypt(p, a), b), a);
    @(negedge clk);
    pt_in = p; k1 = a; k2 = b;
    start = 1;
    @(negedge clk);
    start = 0;
    pt_in = rand128(); k1 = rand128(); k2 = rand128();
    cycles = 0;
    while (!cvalid && cycles < 300) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != 66) begin failures++; $display("FAIL encryption latency %0d", cycles); end
    checks++;
    if (ct !== exp_ct) begin failures++; $display("FAIL ciphertext %032h exp %032h", ct, exp_ct); end
    else n_enc++;
    checks++;
    if (g1 !== to_gray(a) || g2 !== to_gray(b)) begin failures++; $display("FAIL gray keys"); end
    else n_gray++;
    if (a == b) begin
      checks++;
      if (ct !== encrypt(p, a)) failures++;
      else n_equal_keys++;
    end
    if (poke) begin           // request during the decryption half
      @(negedge clk);
      cycles++;
      start = 1;
      @(negedge clk);
      start = 0;
      cycles++;
    end
    while (!done && cycles < 400) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 133) begin failures++; $display("FAIL round-trip latency %0d", cycles); end
    checks++;
    if (pt_out !== p) begin failures++; $display("FAIL recovered %032h exp %032h", pt_out, p); end
    else n_dec++;
    @(negedge clk);
    checks++;
    if (busy || done || cvalid) begin
      failures++;
      $display("FAIL request while busy was not ignored");
    end else if (poke) n_ignored++;
  endtask

  initial begin
    build_tables();
    pt_in = '0; k1 = '0; k2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
        128'h000102030405060708090a0b0c0d0e0f, 0);
    checks++;
    if (ct !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) failures++;
    for (int n = 0; n < 12; n++) begin
      logic [127:0] p, a, b;
      p = rand128(); a = rand128(); b = (n == 5) ? a : rand128();
      run(p, a, b, n % 4 == 1);
    end
    $display("mechanisms: triple_encrypt=%0d gray_keys=%0d triple_decrypt=%0d equal_keys=%0d busy_ignored=%0d",
             n_enc, n_gray, n_dec, n_equal_keys, n_ignored);
    checks++;
    if (n_enc == 0 || n_gray == 0 || n_dec == 0 || n_equal_keys == 0 || n_ignored == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
