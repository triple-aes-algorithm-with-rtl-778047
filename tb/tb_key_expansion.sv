// tb_key_expansion: self-checking testbench for key_expansion.
//
// Checks the round keys of the AES standard's Appendix A.1 example, then
// random keys against the reference schedule. Also checks that ready rises
// exactly 10 cycles after start and that a second start clears it.
module tb_key_expansion;
  import aes_ref_pkg::*;
  import aes_pkg::round_keys_t;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [127:0] key;
  logic         ready;
  round_keys_t  rk;
  int checks = 0, failures = 0;

  key_expansion dut (.clk(clk), .rst_n(rst_n), .start(start), .key(key),
                     .ready(ready), .round_keys(rk));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expand(logic [127:0] k);
    int cycles;
    @(negedge clk);
    key   = k;
    start = 1;
    @(negedge clk);
    start = 0;
    key   = ~k;               // key must have been sampled
    cycles = 0;
    checks++;
    if (ready) begin failures++; $display("FAIL ready not cleared"); end
    while (!ready && cycles < 50) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 10) begin failures++; $display("FAIL latency %0d", cycles); end
    for (int r = 0; r <= 10; r++) begin
      checks++;
      if (rk[r] !== round_key(k, r)) begin
        failures++;
        $display("FAIL key %032h round %0d got %032h exp %032h", k, r, rk[r], round_key(k, r));
      end
    end
  endtask

  initial begin
    build_tables();
    key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (rk[1] !== 128'ha0fafe1788542cb123a339392a6c7605) failures++;
    checks++;
    if (rk[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++;
    for (int n = 0; n < 30; n++) expand(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
