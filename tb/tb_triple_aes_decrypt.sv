// tb_triple_aes_decrypt: self-checking testbench for triple_aes_decrypt.
//
// Cipher texts made by the reference model as E_k1(D_k2(E_k1(pt))) are fed
// in together with gray-coded keys; the unit must return pt. With equal keys
// the AES standard's known answer is decrypted. Also checks the 66-cycle
// latency, that inputs may change after start and that a start while busy
// is ignored.
module tb_triple_aes_decrypt;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [127:0] ct, g1, g2, pt;
  logic         busy, done;
  int checks = 0, failures = 0;

  triple_aes_decrypt dut (.clk(clk), .rst_n(rst_n), .start(start), .ciphertext(ct),
                          .gray_key1(g1), .gray_key2(g2), .busy(busy), .done(done),
                          .plaintext(pt));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] c, logic [127:0] a, logic [127:0] b,
                     logic [127:0] exp, bit poke);
    int cycles;
    @(negedge clk);
    ct = c; g1 = to_gray(a); g2 = to_gray(b);
    start = 1;
    @(negedge clk);
    start = 0;
    ct = ~c; g1 = ~g1; g2 = ~g2;
    cycles = 0;
    if (poke) begin
      repeat (50) @(negedge clk);
      cycles += 50;
      start = 1;
      @(negedge clk);
      start = 0;
      cycles++;
    end
    while (!done && cycles < 300) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 66) begin failures++; $display("FAIL latency %0d", cycles); end
    checks++;
    if (pt !== exp) begin
      failures++;
      $display("FAIL ct=%032h got=%032h exp=%032h", c, pt, exp);
    end
    @(negedge clk);
    checks++;
    if (done || busy) begin failures++; $display("FAIL done not a pulse"); end
  endtask

  initial begin
    build_tables();
    ct = '0; g1 = '0; g2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f,
        128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 0);
    for (int n = 0; n < 20; n++) begin
      logic [127:0] p, a, b;
      p = rand128(); a = rand128(); b = rand128();
      run(encrypt(decrypt(encrypt(p, a), b), a), a, b, p, n % 3 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
