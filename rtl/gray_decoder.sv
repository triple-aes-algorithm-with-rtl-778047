// gray_decoder: gray code to binary conversion of a key word.
//
// bin[i] = gray[WIDTH-1] ^ ... ^ gray[i]: a prefix XOR from the top bit down,
// the inverse of gray_encoder. Combinational; the chain is WIDTH-1 XORs deep
// (a synthesis tool may rebalance it into a tree). Whole-word conversion, as
// in gray_encoder.
//
// Converting the key back from gray code on the receiving side follows the
// design description; whole-word conversion is this design's choice.
module gray_decoder #(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] gray_in,
  output logic [WIDTH-1:0] bin_out
);
  always_comb begin
    bin_out[WIDTH-1] = gray_in[WIDTH-1];
    for (int i = int'(WIDTH) - 2; i >= 0; i--)
      bin_out[i] = bin_out[i+1] ^ gray_in[i];
  end
endmodule
