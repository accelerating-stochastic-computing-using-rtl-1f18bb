// tb_dhs_sng_clkdiv: checks the clock division DHS SNG pair at N = 8.
//
// After a restart both Halton values are compared every cycle with the
// closed-form reference (dhs_ref_pkg) over a full period and beyond. The AND
// of the two output streams is counted over the full period 65536 and must
// equal a*b exactly; the stream bs0 must hold b0 ones in every 2^N cycles.
// Also checks that en low holds both sources.
module tb_dhs_sng_clkdiv;
  import dhs_ref_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned APPROACH = 2;
  localparam longint unsigned FULL = 65536;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [N-1:0] b0, b1, h0, h1;
  logic bs0, bs1;
  int checks = 0, failures = 0;

  dhs_sng_clkdiv #(.N(N)) dut (.clk, .rst_n, .clr, .en, .b0, .b1, .h0, .h1, .bs0, .bs1);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned pairs [4][2] = '{'{255, 255}, '{200, 37}, '{1, 128}, '{171, 90}};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (pairs[p]) begin
      longint unsigned prod;
      int unsigned ones0;
      prod = 0; ones0 = 0;
      b0 = N'(pairs[p][0]); b1 = N'(pairs[p][1]);
      @(negedge clk); clr = 1; @(negedge clk); clr = 0; en = 1;
      for (longint unsigned t = 0; t < FULL; t++) begin
        if (p == 0 || t < 1100)
          check(h0 == N'(ref_h0(t, N)) && h1 == N'(ref_h1(APPROACH, t, N)),
                $sformatf("sources at t=%0d: h0=%0d h1=%0d", t, h0, h1));
        prod += longint'(bs0 & bs1);
        ones0 += int'(bs0);
        if ((t + 1) % 256 == 0) begin
          check(ones0 == pairs[p][0], $sformatf("bs0 ones per 2^N = %0d", ones0));
          ones0 = 0;
        end
        @(negedge clk);
      end
      check(prod == longint'(pairs[p][0]) * pairs[p][1],
            $sformatf("product %0d*%0d gave %0d", pairs[p][0], pairs[p][1], prod));
      en = 0;
    end
    // en low holds both sources
    begin
      logic [N-1:0] k0, k1;
      en = 1; repeat (300) @(negedge clk); en = 0;
      k0 = h0; k1 = h1;
      repeat (5) @(negedge clk);
      check(h0 == k0 && h1 == k1, "en low holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
