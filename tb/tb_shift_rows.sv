// tb_shift_rows: self-checking testbench for shift_rows.
//
// Drives 200 random and directed 128-bit states and compares the output with
// the independent reference model in aes_ref_pkg.
module tb_shift_rows;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  shift_rows dut (.state_in(din), .state_out(dout));

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
    // AES standard, Appendix B round 1: after SubBytes -> after ShiftRows
    din = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1 check(128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS-197 B");
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      #1 check(shift_rows(din), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
