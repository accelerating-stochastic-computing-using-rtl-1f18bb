// dhs_sng_prime: pair of DHS stochastic number generators decorrelated by
// relatively prime lengths.
//
// Halton1 counts over all 2^N states. Halton2 uses one state less: it restarts
// at 0 after 2^N-2 (for N = 8: after 11111110), so its period is 2^N-1. As the
// two periods are coprime, every state of one source meets every state of the
// other once in 2^N*(2^N-1) cycles (65280 for N = 8), which makes an AND of
// the two streams an exact product over that length. Because the Halton
// values are evenly spread, shorter (truncated) runs are already close.
//
// Interface: b0/b1 are the operands (value b/2^N); bs0 = b0 > h0 and
// bs1 = b1 > h1 are the output streams. h0/h1 are brought out so that further
// comparators can share the same sources. clr restarts both sources, en
// advances them; both controls are this design's additions.
module dhs_sng_prime #(
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


  halton_counter #(.N(N), .LAST((1 << N) - 1)) u_halton1 (
    .clk, .rst_n, .clr, .en, .count(), .halton(h0)
  );

  halton_counter #(.N(N), .LAST((1 << N) - 2)) u_halton2 (
    .clk, .rst_n, .clr, .en, .count(), .halton(h1)
  );

  sng_comparator #(.N(N)) u_cmp0 (.b(b0), .h(h0), .bit_o(bs0));
  sng_comparator #(.N(N)) u_cmp1 (.b(b1), .h(h1), .bit_o(bs1));

endmodule
