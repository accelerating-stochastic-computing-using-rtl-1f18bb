// dhs_sng_clkdiv: pair of DHS stochastic number generators decorrelated by
// clock division.
//
// Halton1 counts every cycle; Halton2 counts once per full pass of Halton1,
// stepping on the same edge at which counter1 leaves the all-ones state. Each
// Halton2 value is held while Halton1 runs through all 2^N values, so after
// 2^(2N) cycles every pair of states has met once and an AND of the two
// streams is an exact product.
//
// The divided clock of the original drawing is realised here as a count
// enable on the common clock (enable = AND of counter1's bits), which keeps a
// single clock domain; this is this design's choice. Interface as
// dhs_sng_prime.
module dhs_sng_clkdiv #(
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
  logic         tick;

  // N-input AND of counter1's state: one pulse per counter1 period.
  assign tick = &c1;

  halton_counter #(.N(N)) u_halton1 (
    .clk, .rst_n, .clr, .en, .count(c1), .halton(h0)
  );

  halton_counter #(.N(N)) u_halton2 (
    .clk, .rst_n, .clr, .en(en && tick), .count(), .halton(h1)
  );

  sng_comparator #(.N(N)) u_cmp0 (.b(b0), .h(h0), .bit_o(bs0));
  sng_comparator #(.N(N)) u_cmp1 (.b(b1), .h(h1), .bit_o(bs1));

endmodule
