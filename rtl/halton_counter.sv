// halton_counter: base-2 Halton (van der Corput) number source.
//
// In base 2 the Halton sequence is the radical inverse of the index: write the
// index in binary and mirror the bits about the binary point. The generator is
// therefore an ordinary N-bit up-counter whose output bits are wired in
// reverse order; no arithmetic is needed beyond the counter. Consecutive
// outputs fill [0, 2^N) evenly (0, 1/2, 1/4, 3/4, ...), which is what gives
// the bit-streams built from it their fast convergence.
//
// The counter restarts at 0 after state LAST. LAST = 2^N-1 is a plain
// wrap-around counter; LAST = 2^N-2 gives the period 2^N-1 used by the prime
// length pairing.
//
// Interface: clr restarts at state 0 (synchronous, wins over en); en advances
// one state per clock. count and halton reflect the current state, so the
// value seen in a cycle is the one the comparators use in that cycle.
// Reset values and the clr/en controls are this design's own choices.
module halton_counter #(
  parameter int unsigned N    = 8,
  parameter int unsigned LAST = (1 << N) - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [N-1:0] count,
  output logic [N-1:0] halton
);

  localparam logic [N-1:0] LastState = N'(LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   count <= '0;
    else if (clr)                 count <= '0;
    else if (en) begin
      if (count == LastState)     count <= '0;
      else                        count <= count + 1'b1;
    end
  end

  // The state never passes LAST (for the prime length pair: never 2^N-1).
  assert property (@(posedge clk) disable iff (!rst_n) count <= LastState);

  // Radical inverse in base 2: bit i of the count becomes bit N-1-i.
  always_comb begin
    for (int i = 0; i < N; i++) halton[i] = count[N-1-i];
  end

endmodule
