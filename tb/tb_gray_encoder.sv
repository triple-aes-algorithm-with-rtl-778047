// tb_gray_encoder: self-checking testbench for gray_encoder (128 bits).
//
// Compares with a bit-loop reference, checks that successive integers give
// gray words one bit apart, and checks that the reference decoder recovers
// the input.
module tb_gray_encoder;
  import aes_ref_pkg::*;
  logic [127:0] bin, gray, prev;
  int checks = 0, failures = 0;

  gray_encoder dut (.bin_in(bin), .gray_out(gray));

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
      bin = rand128();
      #1;
      checks++;
      if (gray !== to_gray(bin)) begin
        failures++;
        $display("FAIL bin=%032h gray=%032h", bin, gray);
      end
      checks++;
      if (from_gray(gray) !== bin) failures++;
    end
    // unit distance between consecutive values, including carries into the top
    bin = 128'h7fff_ffff_ffff_ffff_ffff_ffff_ffff_fff0;
    #1 prev = gray;
    for (int n = 0; n < 40; n++) begin
      bin = bin + 1;
      #1;
      checks++;
      if ($countones(gray ^ prev) != 1) begin
        failures++;
        $display("FAIL unit distance at %032h", bin);
      end
      prev = gray;
    end
    bin = 128'h1;
    #1 checks++;
    if (gray !== 128'h1) failures++;
    bin = 128'h2;
    #1 checks++;
    if (gray !== 128'h3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
