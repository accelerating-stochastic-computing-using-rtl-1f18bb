// bernsen_sc: stochastic Bernsen binarization of one pixel.
//
// Bernsen's method binarizes the centre pixel X(i,j) of a KxK window using
// the window's minimum and maximum: the local threshold is T = (min+max)/2
// and the local contrast H = max-min. If the contrast exceeds a threshold S,
// the pixel is 1 when X > T; otherwise the whole neighbourhood is taken as
// one class and the pixel is 1 when T exceeds a global threshold TT.
//
// Datapath, per cycle:
//   * K*K pixel streams, all compared against the same Halton1 value h0, so
//     they are fully correlated: their AND is the stream of the minimum and
//     their OR the stream of the maximum.
//   * A MUX (AND on input 0, OR on input 1) whose select stream has value 1/2
//     (Halton2 compared with 2^(N-1)) gives T; an XOR of AND and OR gives H.
//   * Three counters (sc_counter) convert the centre pixel, T and H streams.
//     Over the document's length BSL = 2^(N+1) they hold X*2, T*2 and H*2 in
//     units of 1/2^N.
//   * Three magnitude comparators and bernsen_logic form the result:
//       EN1 = H count > S*BSL, EN2 = T count > TT*BSL, EN3 = X count > T count,
//       OUT = EN1*EN3 + not(EN1)*EN2.
//     S*BSL and TT*BSL are (s*len)>>N and (tt*len)>>N, len being the run length.
//
// Interface: pix[] is row major with the centre at index K*K/2; tt and s are
// N-bit fractions of 1; clr/en clear and advance the counters. The en outputs
// and out are combinational from the counters and are valid once the run has
// ended. The gate structure follows the published circuit; which side of each
// comparator is the greater one, the select comparator and the scaling of the
// thresholds by len are this design's choices.
module bernsen_sc #(
  parameter int unsigned N  = 8,
  parameter int unsigned K  = 3,
  parameter int unsigned LW = 17
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          en,
  input  logic [N-1:0]  h0,
  input  logic [N-1:0]  h1,
  input  logic [N-1:0]  pix [K*K],
  input  logic [N-1:0]  tt,
  input  logic [N-1:0]  s,
  input  logic [LW-1:0] len,
  output logic [LW-1:0] x_cnt,
  output logic [LW-1:0] t_cnt,
  output logic [LW-1:0] h_cnt,
  output logic          en1,
  output logic          en2,
  output logic          en3,
  output logic          out
);

  localparam int unsigned NP     = K * K;
  localparam int unsigned CENTRE = NP / 2;
  localparam logic [N-1:0] Half  = N'(1 << (N - 1));

  logic [NP-1:0] ps;
  logic          s_min, s_max, sel, t_bit, h_bit;

  for (genvar g = 0; g < NP; g++) begin : g_pix
    sng_comparator #(.N(N)) u_cmp (.b(pix[g]), .h(h0), .bit_o(ps[g]));
  end

  sng_comparator #(.N(N)) u_sel (.b(Half), .h(h1), .bit_o(sel));

  assign s_min = &ps;                   // AND of correlated streams: minimum
  assign s_max = |ps;                   // OR of correlated streams: maximum
  assign t_bit = sel ? s_max : s_min;   // (min + max) / 2
  assign h_bit = s_max ^ s_min;         // max - min

  sc_counter #(.W(LW)) u_cnt_x (.clk, .rst_n, .clr, .en, .bit_i(ps[CENTRE]), .count(x_cnt));
  sc_counter #(.W(LW)) u_cnt_t (.clk, .rst_n, .clr, .en, .bit_i(t_bit),      .count(t_cnt));
  sc_counter #(.W(LW)) u_cnt_h (.clk, .rst_n, .clr, .en, .bit_i(h_bit),      .count(h_cnt));

  // Thresholds scaled to the run length: value * len / 2^N.
  logic [LW+N-1:0] tt_prod, s_prod;
  logic [LW-1:0]   tt_bsl, s_bsl;

  assign tt_prod = (LW+N)'(tt) * (LW+N)'(len);
  assign s_prod  = (LW+N)'(s)  * (LW+N)'(len);
  assign tt_bsl  = tt_prod[LW+N-1:N];
  assign s_bsl   = s_prod[LW+N-1:N];

  assign en1 = (h_cnt > s_bsl);
  assign en2 = (t_cnt > tt_bsl);
  assign en3 = (x_cnt > t_cnt);

  bernsen_logic u_logic (.en1, .en2, .en3, .out);

endmodule
