// roberts_cross_sc: stochastic Robert's cross edge detector.
//
// Computes Z = 0.5 * (|X(i,j) - X(i+1,j+1)| + |X(i+1,j) - X(i,j+1)|).
// The four pixel streams are generated from the same Halton1 value h0, so
// they are fully correlated and an XOR of two of them yields the absolute
// difference of their values. A multiplexer whose select stream (value 1/2)
// comes from Halton2 forms the scaled sum. With a rotation or clock division
// pair, a run of 2^(N+1) cycles already selects each input over a full
// Halton1 period, so the count equals |a-d| + |c-b| exactly (in units of
// 1/2^N, i.e. Z*2^(N+1)).
//
// Interface: pix[0] = X(i,j), pix[1] = X(i,j+1), pix[2] = X(i+1,j),
// pix[3] = X(i+1,j+1). z_bit is the output stream (combinational), count its
// number of 1s (clr/en as sc_counter). Which XOR sits on which MUX input and
// the 1/2 select comparator are this design's choices.
module roberts_cross_sc #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 17
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [N-1:0] h0,
  input  logic [N-1:0] h1,
  input  logic [N-1:0] pix [4],
  output logic         z_bit,
  output logic [W-1:0] count
);

  localparam logic [N-1:0] Half = N'(1 << (N - 1));

  logic [3:0] ps;
  logic       sel, diff_a, diff_b;

  for (genvar g = 0; g < 4; g++) begin : g_pix
    sng_comparator #(.N(N)) u_cmp (.b(pix[g]), .h(h0), .bit_o(ps[g]));
  end

  sng_comparator #(.N(N)) u_sel (.b(Half), .h(h1), .bit_o(sel));

  assign diff_a = ps[0] ^ ps[3];   // |X(i,j)   - X(i+1,j+1)|
  assign diff_b = ps[2] ^ ps[1];   // |X(i+1,j) - X(i,j+1)|
  assign z_bit  = sel ? diff_b : diff_a;

  sc_counter #(.W(W)) u_cnt (
    .clk, .rst_n, .clr, .en, .bit_i(z_bit), .count
  );

endmodule
