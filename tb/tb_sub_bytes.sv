// tb_sub_bytes: self-checking testbench for sub_bytes.
//
// Drives 50 random and directed 128-bit states and compares the output with
// the independent reference model in aes_ref_pkg (S-box found by search), plus known values from the AES standard.
module tb_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  sub_bytes dut (.state_in(din), .state_out(dout));

  task automatic check(logic [127:0] exp, string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: in=%032h got=%032h exp=%032h", what, din, dout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_tables();
    // every byte value in every lane: 256 vectors, lane i holds v + 17*i
    for (int v = 0; v < 256; v++) begin
      for (int i = 0; i < 16; i++) din[8*i +: 8] = 8'(v + 17*i);
      #1 check(sub_bytes(din), "exhaustive");
    end
    din = 128'h00102030405060708090a0b0c0d0e0f0;
    #1 check(128'h63cab7040953d051cd60e0e7ba70e18c, "FIPS-197 C.1 round 1");
    for (int n = 0; n < 50; n++) begin
      din = rand128();
      #1 check(sub_bytes(din), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
