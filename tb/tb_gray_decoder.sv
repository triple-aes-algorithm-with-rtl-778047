// tb_gray_decoder: self-checking testbench for gray_decoder (128 bits).
//
// Feeds gray words made by the reference encoder from random binary values
// and expects the binary value back; also compares random gray words with a
// bit-loop reference decoder and checks small known values.
module tb_gray_decoder;
  import aes_ref_pkg::*;
  logic [127:0] gray, bin, src;
  int checks = 0, failures = 0;

  gray_decoder dut (.gray_in(gray), .bin_out(bin));

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
      src  = rand128();
      gray = to_gray(src);
      #1;
      checks++;
      if (bin !== src) begin
        failures++;
        $display("FAIL gray=%032h bin=%032h exp=%032h", gray, bin, src);
      end
      gray = rand128();
      #1;
      checks++;
      if (bin !== from_gray(gray)) failures++;
    end
    gray = 128'h3;
    #1 checks++;
    if (bin !== 128'h2) failures++;
    gray = {1'b1, 127'h0};
    #1 checks++;
    if (bin !== {128{1'b1}}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
