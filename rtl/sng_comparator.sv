// sng_comparator: binary-to-stochastic conversion.
//
// Emits 1 when the binary operand b is greater than the number source value
// h. With h running over all 2^N values once per period the stream holds
// exactly b ones per 2^N bits, i.e. it encodes b/2^N. Purely combinational.
// The comparator and its B/H inputs are the document's; that b sits on the
// greater side is this design's reading.
module sng_comparator #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] b,
  input  logic [N-1:0] h,
  output logic         bit_o
);

  assign bit_o = (b > h);

endmodule
