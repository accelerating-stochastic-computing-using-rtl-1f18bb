// sc_multiplier: unipolar stochastic multiplier with result counter.
//
// An AND gate multiplies two uncorrelated bit-streams: the probability of a 1
// in the output is the product of the input probabilities. With the two
// streams of a DHS SNG pair the inputs are decorrelated deterministically, so
// over the full period 2^(2N) (or 2^N*(2^N-1) for the prime length pair) the
// count equals a*b exactly; a truncated run gives an estimate that converges
// quickly. The counter adds the AND output of each enabled cycle (see
// sc_counter); prod is the combinational product stream. Multiplication of
// two DHS streams is the operation the design is evaluated on; the AND gate
// is the standard unipolar SC multiplier, the counter this design's choice.
module sc_multiplier #(
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         bs0,
  input  logic         bs1,
  output logic         prod,
  output logic [W-1:0] count
);

  assign prod = bs0 & bs1;

  sc_counter #(.W(W)) u_cnt (
    .clk, .rst_n, .clr, .en, .bit_i(prod), .count
  );

endmodule
