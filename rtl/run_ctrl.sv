// run_ctrl: bit-stream length controller.
//
// Deterministic Halton bit-streams converge quickly, so a computation may be
// stopped as soon as its accuracy is sufficient instead of running the full
// 2^(2N)-cycle period. This block sets that length. A start pulse while idle
// clears the number sources and output counters (clr, same cycle), latches
// bsl, and then asserts run for exactly bsl cycles; in the cycle after the
// last run cycle the output counters hold their final values and done pulses
// for one cycle. Start from done to done therefore takes bsl+1 cycles.
// A start while busy is ignored. The length is a run-time cycle count (any
// value, not only powers of two, so the prime-length periods k*(2^N-1) can be
// used); this interface is this design's own.
module run_ctrl #(
  parameter int unsigned LW = 17
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LW-1:0] bsl,
  output logic          clr,
  output logic          run,
  output logic          busy,
  output logic          done,
  output logic [LW-1:0] len
);

  logic [LW-1:0] remain;

  assign clr  = start && !busy;
  assign run  = busy && (remain != '0);
  assign done = busy && (remain == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      remain <= '0;
      len    <= '0;
    end else if (clr) begin
      busy   <= 1'b1;
      remain <= bsl;
      len    <= bsl;
    end else if (run) begin
      remain <= remain - 1'b1;
    end else if (done) begin
      busy   <= 1'b0;
    end
  end

  // run and done never coincide, and clr only happens when idle.
  assert property (@(posedge clk) disable iff (!rst_n) !(run && done));
  assert property (@(posedge clk) disable iff (!rst_n) clr |-> !run);

endmodule
