// dhs_sc_top: deterministic Halton sequence stochastic computing engine.
//
// Holds the three DHS SNG pairs (prime length, rotation, clock division) and
// three stochastic circuits that run from them side by side: a multiplier,
// a Robert's cross edge detector and a Bernsen binarizer. A start pulse
// samples the approach select, restarts all number sources and counters, and
// runs for bsl cycles (run_ctrl); done then pulses for one cycle with every
// count final. The chosen pair supplies Halton1/Halton2 to all circuits: the
// multiplier uses the pair's own comparators (b0 = mul_a, b1 = mul_b), the
// other two compare their pixels against the shared Halton values.
//
// Timing: start in cycle S, run in cycles S+1 .. S+bsl, done in S+bsl+1.
// Exact results need bsl = 2^(2N) (multiplier; 2^N*(2^N-1) with the prime
// pair) or bsl = 2^(N+1) (Robert's cross and Bernsen with rotation or clock
// division); shorter runs trade accuracy for time.
// Putting the three pairs behind one run-time select and running the three
// circuits together is this design's arrangement; the document evaluates
// each circuit with each pair separately.
module dhs_sc_top
  import dhs_pkg::*;
#(
  parameter int unsigned N  = DHS_N,
  parameter int unsigned LW = 2 * N + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  approach_e     approach,
  input  logic [LW-1:0] bsl,
  input  logic [N-1:0]  mul_a,
  input  logic [N-1:0]  mul_b,
  input  logic [N-1:0]  rc_pix [4],
  input  logic [N-1:0]  bn_pix [9],
  input  logic [N-1:0]  bn_tt,
  input  logic [N-1:0]  bn_s,
  output logic          busy,
  output logic          done,
  output logic [LW-1:0] mul_count,
  output logic [LW-1:0] rc_count,
  output logic [LW-1:0] bn_x_cnt,
  output logic [LW-1:0] bn_t_cnt,
  output logic [LW-1:0] bn_h_cnt,
  output logic          bn_out
);

  logic          clr, run;
  logic [LW-1:0] len;
  approach_e     mode;

  run_ctrl #(.LW(LW)) u_ctrl (
    .clk, .rst_n, .start, .bsl, .clr, .run, .busy, .done, .len
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   mode <= APPROACH_ROTATION;
    else if (clr) mode <= approach;
  end

  // The three SNG pairs. All are restarted together; only the selected one
  // is advanced.
  logic [N-1:0] h0_p, h1_p, h0_r, h1_r, h0_c, h1_c;
  logic         bs0_p, bs1_p, bs0_r, bs1_r, bs0_c, bs1_c;

  dhs_sng_prime #(.N(N)) u_sng_prime (
    .clk, .rst_n, .clr, .en(run && mode == APPROACH_PRIME),
    .b0(mul_a), .b1(mul_b), .h0(h0_p), .h1(h1_p), .bs0(bs0_p), .bs1(bs1_p)
  );

  dhs_sng_rotation #(.N(N)) u_sng_rot (
    .clk, .rst_n, .clr, .en(run && mode == APPROACH_ROTATION),
    .b0(mul_a), .b1(mul_b), .h0(h0_r), .h1(h1_r), .bs0(bs0_r), .bs1(bs1_r)
  );

  dhs_sng_clkdiv #(.N(N)) u_sng_cd (
    .clk, .rst_n, .clr, .en(run && mode == APPROACH_CLKDIV),
    .b0(mul_a), .b1(mul_b), .h0(h0_c), .h1(h1_c), .bs0(bs0_c), .bs1(bs1_c)
  );

  logic [N-1:0] h0, h1;
  logic         bs0, bs1;

  always_comb begin
    unique case (mode)
      APPROACH_PRIME:  begin h0 = h0_p; h1 = h1_p; bs0 = bs0_p; bs1 = bs1_p; end
      APPROACH_CLKDIV: begin h0 = h0_c; h1 = h1_c; bs0 = bs0_c; bs1 = bs1_c; end
      default:         begin h0 = h0_r; h1 = h1_r; bs0 = bs0_r; bs1 = bs1_r; end
    endcase
  end

  sc_multiplier #(.W(LW)) u_mul (
    .clk, .rst_n, .clr, .en(run), .bs0, .bs1, .prod(), .count(mul_count)
  );

  roberts_cross_sc #(.N(N), .W(LW)) u_rc (
    .clk, .rst_n, .clr, .en(run), .h0, .h1, .pix(rc_pix), .z_bit(), .count(rc_count)
  );

  bernsen_sc #(.N(N), .K(3), .LW(LW)) u_bn (
    .clk, .rst_n, .clr, .en(run), .h0, .h1, .pix(bn_pix), .tt(bn_tt), .s(bn_s),
    .len, .x_cnt(bn_x_cnt), .t_cnt(bn_t_cnt), .h_cnt(bn_h_cnt),
    .en1(), .en2(), .en3(), .out(bn_out)
  );

endmodule
