// tb_bernsen_sc: checks the stochastic Bernsen binarizer.
//
// Halton values come from the closed-form reference of each SNG pair. Over
// the run length BSL = 2^(N+1), with the rotation and clock division pairs,
// the counters must hold exactly X*2, min+max (= T*2) and (max-min)*2 (= H*2),
// and the output must follow Bernsen's rule computed in integers:
//   (max-min)*2 > S*2 ?  X*2 > min+max  :  min+max > TT*2.
// With the prime length pair the counters are compared with a cycle-by-cycle
// tally of the reference streams. Both contrast branches must occur.
module tb_bernsen_sc;
  import dhs_ref_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned K  = 3;
  localparam int unsigned LW = 17;
  localparam int unsigned L  = 1 << (N + 1);

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [N-1:0] h0 = '0, h1 = '0, tt = '0, s = '0;
  logic [N-1:0] pix [K*K];
  logic [LW-1:0] len = LW'(L), x_cnt, t_cnt, h_cnt;
  logic en1, en2, en3, out;
  int checks = 0, failures = 0;
  int hi_contrast = 0, lo_contrast = 0, ones_out = 0;

  bernsen_sc #(.N(N), .K(K), .LW(LW)) dut (
    .clk, .rst_n, .clr, .en, .h0, .h1, .pix, .tt, .s, .len,
    .x_cnt, .t_cnt, .h_cnt, .en1, .en2, .en3, .out
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [K*K];
    int mn, mx, xs, ts, hs, sel, smin, smax, hv, exp_out, base, spread, ttv, sv;
    foreach (pix[i]) pix[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ap = 0; ap < 3; ap++) begin
      for (int w = 0; w < 60; w++) begin
        base = $urandom_range(0, 255);
        spread = (w % 2) ? $urandom_range(0, 20) : $urandom_range(0, 255);
        mn = 255; mx = 0;
        foreach (p[i]) begin
          p[i] = base + $urandom_range(0, spread) - spread / 2;
          if (p[i] < 0) p[i] = 0;
          if (p[i] > 255) p[i] = 255;
          pix[i] = N'(p[i]);
          if (p[i] < mn) mn = p[i];
          if (p[i] > mx) mx = p[i];
        end
        ttv = $urandom_range(60, 200); sv = $urandom_range(10, 60);
        tt = N'(ttv); s = N'(sv);
        clr = 1; @(negedge clk); clr = 0; en = 1;
        xs = 0; ts = 0; hs = 0;
        for (int t = 0; t < L; t++) begin
          hv = ref_h0(t, N);
          h0 = N'(hv); h1 = N'(ref_h1(ap, t, N));
          sel = (ref_h1(ap, t, N) < (1 << (N - 1)));
          smin = (mn > hv); smax = (mx > hv);
          xs += (p[K*K/2] > hv);
          ts += sel ? smax : smin;
          hs += smax ^ smin;
          @(negedge clk);
        end
        en = 0;
        check(x_cnt == LW'(xs) && t_cnt == LW'(ts) && h_cnt == LW'(hs),
              $sformatf("ap=%0d tallies x %0d/%0d t %0d/%0d h %0d/%0d", ap, x_cnt, xs, t_cnt, ts, h_cnt, hs));
        if (ap != 0) begin
          check(x_cnt == LW'(2 * p[K*K/2]), "x count = 2X");
          check(t_cnt == LW'(mn + mx), "t count = min+max");
          check(h_cnt == LW'(2 * (mx - mn)), "h count = 2(max-min)");
          if (2 * (mx - mn) > 2 * sv) begin
            exp_out = (2 * p[K*K/2] > mn + mx);
            hi_contrast++;
          end else begin
            exp_out = (mn + mx > 2 * ttv);
            lo_contrast++;
          end
        end else begin
          exp_out = (hs > 2 * sv) ? (xs > ts) : (ts > 2 * ttv);
        end
        check(out == 1'(exp_out), $sformatf("ap=%0d out %0d expected %0d", ap, out, exp_out));
        ones_out += int'(out);
      end
    end
    check(hi_contrast > 5 && lo_contrast > 5, "both contrast branches exercised");
    check(ones_out > 5 && ones_out < 175, "both output values seen");
    $display("high contrast %0d, low contrast %0d, ones %0d", hi_contrast, lo_contrast, ones_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
