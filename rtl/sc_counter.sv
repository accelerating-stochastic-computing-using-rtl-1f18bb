// sc_counter: stochastic-to-binary converter.
//
// Counts the 1s of a bit-stream. After L enabled cycles the count divided by
// L is the value the stream encodes. clr (synchronous) empties the count and
// wins over en; en adds bit_i of the current cycle on the next clock edge.
// The width W must hold the longest stream used; 17 bits hold 2^16.
// Counters as stochastic-to-binary converters are part of the published
// circuits; the width, clear and enable are this design's choices.
module sc_counter #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         bit_i,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             count <= '0;
    else if (clr)           count <= '0;
    else if (en && bit_i)   count <= count + 1'b1;
  end

endmodule
