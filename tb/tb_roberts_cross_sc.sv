// tb_roberts_cross_sc: checks the stochastic Robert's cross detector.
//
// The Halton values are driven from the closed-form reference of each of the
// three SNG pairs. For every window the count after 2^(N+1) cycles is compared
//   * with a cycle-by-cycle tally of the reference streams (all pairs), and
//   * for rotation and clock division with the exact value
//     |X(i,j)-X(i+1,j+1)| + |X(i+1,j)-X(i,j+1)|  (= Z * 2^(N+1)).
module tb_roberts_cross_sc;
  import dhs_ref_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned W = 17;
  localparam int unsigned L = 1 << (N + 1);

  logic clk = 0, rst_n = 0, clr = 0, en = 0, z_bit;
  logic [N-1:0] h0 = '0, h1 = '0;
  logic [N-1:0] pix [4];
  logic [W-1:0] count;
  int checks = 0, failures = 0;

  roberts_cross_sc #(.N(N), .W(W)) dut (.clk, .rst_n, .clr, .en, .h0, .h1, .pix, .z_bit, .count);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int absd(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [4];
    int tally, exact, sel, a, b;
    foreach (pix[i]) pix[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ap = 0; ap < 3; ap++) begin
      for (int w = 0; w < 40; w++) begin
        foreach (p[i]) begin
          p[i] = (w < 4) ? ((w == 0) ? 0 : (w == 1) ? 255 : (i % 2) * 255) : $urandom_range(0, 255);
          pix[i] = N'(p[i]);
        end
        clr = 1; @(negedge clk); clr = 0; en = 1;
        tally = 0;
        for (int t = 0; t < L; t++) begin
          h0 = N'(ref_h0(t, N)); h1 = N'(ref_h1(ap, t, N));
          sel = (ref_h1(ap, t, N) < (1 << (N - 1)));
          a = (p[0] > ref_h0(t, N)) != (p[3] > ref_h0(t, N));
          b = (p[2] > ref_h0(t, N)) != (p[1] > ref_h0(t, N));
          tally += sel ? b : a;
          #1 check(z_bit == 1'((sel ? b : a)), $sformatf("z_bit ap=%0d t=%0d", ap, t));
          @(negedge clk);
        end
        en = 0;
        exact = absd(p[0], p[3]) + absd(p[2], p[1]);
        check(count == W'(tally), $sformatf("ap=%0d count %0d tally %0d", ap, count, tally));
        if (ap != 0)
          check(count == W'(exact), $sformatf("ap=%0d count %0d exact %0d", ap, count, exact));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
