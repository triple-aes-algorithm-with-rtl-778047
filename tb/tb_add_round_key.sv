// tb_add_round_key: self-checking testbench for add_round_key.
//
// Random and directed state/key pairs; the expected output is built bit by
// bit as state[i] != key[i].
module tb_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] st, key, dout, exp;
  int checks = 0, failures = 0;

  add_round_key dut (.state_in(st), .round_key(key), .state_out(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_tables();
    for (int n = 0; n < 300; n++) begin
      st  = (n == 0) ? 128'h3243f6a8885a308d313198a2e0370734 : rand128();
      key = (n == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : rand128();
      for (int i = 0; i < 128; i++) exp[i] = (st[i] != key[i]);
      #1;
      checks++;
      if (n == 0 && dout !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) failures++;
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL st=%032h key=%032h got=%032h", st, key, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
