// gray_encoder: binary to gray code conversion of a key word.
//
// gray = bin ^ (bin >> 1): each gray bit is the XOR of a binary bit and the
// bit above it; the top bit is copied. Combinational. The whole WIDTH-bit
// word is converted as one number; the 128-bit default is the cipher key
// width. Converting the key to gray code before it is handed on follows the
// design description; whole-word conversion is this design's choice.
module gray_encoder #(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] bin_in,
  output logic [WIDTH-1:0] gray_out
);
  assign gray_out = bin_in ^ (bin_in >> 1);
endmodule
