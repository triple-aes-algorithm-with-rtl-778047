// tb_triple_aes_encrypt: self-checking testbench for triple_aes_encrypt.
//
// Random plain texts and key pairs against E_k1(D_k2(E_k1(pt))) from the
// reference model, plus the gray-coded keys. With key1 = key2 the triple
// operation reduces to one AES encryption, which is checked with the AES
// standard's known answer. Also checks the 66-cycle latency, that inputs may
// change after start and that a start while busy is ignored.
module tb_triple_aes_encrypt;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [127:0] pt, k1, k2, ct, g1, g2;
  logic         busy, done;
  int checks = 0, failures = 0;

  triple_aes_encrypt dut (.clk(clk), .rst_n(rst_n), .start(start), .plaintext(pt),
                          .key1(k1), .key2(k2), .busy(busy), .done(done),
                          .ciphertext(ct), .gray_key1(g1), .gray_key2(g2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] p, logic [127:0] a, logic [127:0] b,
                     logic [127:0] exp, bit poke);
    int cycles;
    @(negedge clk);
    pt = p; k1 = a; k2 = b;
    start = 1;
    @(negedge clk);
    start = 0;
    pt = ~p; k1 = ~a; k2 = ~b;
    cycles = 0;
    if (poke) begin
      repeat (30) @(negedge clk);
      cycles += 30;
      start = 1;
      @(negedge clk);
      start = 0;
      cycles++;
    end
    while (!done && cycles < 300) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 66) begin failures++; $display("FAIL latency %0d", cycles); end
    checks++;
    if (ct !== exp) begin
      failures++;
      $display("FAIL pt=%032h k1=%032h k2=%032h got=%032h exp=%032h", p, a, b, ct, exp);
    end
    checks++;
    if (g1 !== to_gray(a) || g2 !== to_gray(b)) begin failures++; $display("FAIL gray keys"); end
    @(negedge clk);
    checks++;
    if (done || busy) begin failures++; $display("FAIL done not a pulse"); end
  endtask

  initial begin
    build_tables();
    pt = '0; k1 = '0; k2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
        128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0);
    for (int n = 0; n < 20; n++) begin
      logic [127:0] p, a, b;
      p = rand128(); a = rand128(); b = rand128();
      run(p, a, b, encrypt(decrypt(encrypt(p, a), b), a), n % 3 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
