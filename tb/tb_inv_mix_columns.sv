// tb_inv_mix_columns: self-checking testbench for inv_mix_columns.
//
// Drives 200 random and directed 128-bit states and compares the output with
// the independent reference model in aes_ref_pkg.
module tb_inv_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  inv_mix_columns dut (.state_in(din), .state_out(dout));

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
    din = 128'h046681e5e0cb199a48f8d37a2806264c;
    #1 check(128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS-197 B inverse");
    din = {32'h8e4da1bc, 32'h9fdc589d, 32'h01010101, 32'hc6c6c6c6};
    #1 check({32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hc6c6c6c6}, "known columns");
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      #1 check(inv_mix_columns(din), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
