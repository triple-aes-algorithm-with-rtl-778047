// tb_aes_decrypt: self-checking testbench for aes_decrypt.
//
// Runs the AES standard's known-answer vectors and random blocks and keys
// against the reference model, checks the 21-cycle start-to-done latency,
// that done is a single-cycle pulse, that block_in and key may change after
// start, and that a start while busy is ignored.
module tb_aes_decrypt;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [127:0] din, key, dout;
  logic         busy, done;
  int checks = 0, failures = 0;

  aes_decrypt dut (.clk(clk), .rst_n(rst_n), .start(start), .block_in(din), .key(key),
          .busy(busy), .done(done), .block_out(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] d, logic [127:0] k, logic [127:0] exp, bit poke);
    int cycles;
    @(negedge clk);
    din   = d;
    key   = k;
    start = 1;
    @(negedge clk);
    start = 0;
    din   = ~d;
    key   = ~k;
    cycles = 0;
    if (poke) begin           // a second request while busy must be ignored
      start = 1;
      @(negedge clk);
      start = 0;
      cycles++;
    end
    while (!done && cycles < 100) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 21) begin failures++; $display("FAIL latency %0d", cycles); end
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL in=%032h key=%032h got=%032h exp=%032h", d, k, dout, exp);
    end
    @(negedge clk);
    checks++;
    if (done || busy || dout !== exp) begin failures++; $display("FAIL done not a pulse / output not held"); end
  endtask

  initial begin
    build_tables();
    din = '0;
    key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 0);
    run(128'h3925841d02dc09fbdc118597196a0b32, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 1);
    for (int n = 0; n < 40; n++) begin
      logic [127:0] d, k;
      d = rand128();
      k = rand128();
      run(d, k, decrypt(d, k), n % 2 == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
