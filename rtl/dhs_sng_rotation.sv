// dhs_sng_rotation: pair of DHS stochastic number generators decorrelated by
// rotation.
//
// Both sources count over all 2^N states on the same clock, but Halton2 is
// inhibited (holds its state) for the one cycle in which counter1 is all ones.
// Each pass of counter1 therefore meets Halton2 shifted by one more step, and
// after 2^N passes (2^(2N) cycles) every pair of states has met once: an AND
// of the two streams is then an exact product.
//
// Interface as dhs_sng_prime: bs0 = b0 > h0, bs1 = b1 > h1, h0/h1 shared with
// further comparators, clr/en (this design's additions) restart and advance.
// The inhibit is a synchronous count enable of counter2.
module dhs_sng_rotation #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [N-1:0] b0,
  input  logic [N-1:0] b1,
  output logic [N-1:0] h0,
  output logic [N-1:0] h1,
  output logic         bs0,
  output logic         bs1
);

  logic [N-1:0] c1;
  logic         inhibit;

  // N-input AND of counter1's state.
  assign inhibit = &c1;

  halton_counter #(.N(N)) u_halton1 (
    .clk, .rst_n, .clr, .en, .count(c1), .halton(h0)
  );

  halton_counter #(.N(N)) u_halton2 (
    .clk, .rst_n, .clr, .en(en && !inhibit), .count(), .halton(h1)
  );

  sng_comparator #(.N(N)) u_cmp0 (.b(b0), .h(h0), .bit_o(bs0));
  sng_comparator #(.N(N)) u_cmp1 (.b(b1), .h(h1), .bit_o(bs1));

endmodule
