// tb_dhs_sc_top: end-to-end test of the DHS stochastic computing engine at
// its default size (N = 8, 17-bit lengths and counts).
//
// For each of the three SNG pairs it runs
//   * one full-period computation (2^16 cycles, 65280 for the prime length
//     pair), after which the product count must be exactly a*b;
//   * several truncated computations of 2^(N+1) = 512 cycles and shorter, in
//     which Robert's cross and Bernsen must be exact for rotation and clock
//     division;
// and in every run all counts and the Bernsen output are compared with a
// cycle-by-cycle tally of a reference model of the number sources
// (dhs_ref_pkg). The latency start -> done must be bsl+1 cycles. Each
// mechanism (three approaches, full and truncated runs, ignored start while
// busy, rotation inhibit, clock division step, prime restart, both Bernsen
// contrast branches) is counted and must occur.
module tb_dhs_sc_top;
  import dhs_pkg::*;
  import dhs_ref_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned LW = 2 * N + 1;

  logic clk = 0, rst_n = 0, start = 0;
  approach_e approach = APPROACH_PRIME;
  logic [LW-1:0] bsl = '0;
  logic [N-1:0] mul_a = '0, mul_b = '0, bn_tt = '0, bn_s = '0;
  logic [N-1:0] rc_pix [4];
  logic [N-1:0] bn_pix [9];
  logic busy, done, bn_out;
  logic [LW-1:0] mul_count, rc_count, bn_x_cnt, bn_t_cnt, bn_h_cnt;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_approach [3];
  int n_full = 0, n_trunc = 0, n_busy_start = 0, n_inhibit = 0, n_divstep = 0, n_prime_wrap = 0;
  int n_hi = 0, n_lo = 0;

  dhs_sc_top dut (
    .clk, .rst_n, .start, .approach, .bsl, .mul_a, .mul_b, .rc_pix, .bn_pix,
    .bn_tt, .bn_s, .busy, .done, .mul_count, .rc_count, .bn_x_cnt, .bn_t_cnt,
    .bn_h_cnt, .bn_out
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int absd(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One computation: random operands, run for len cycles, compare with the
  // reference tally. exact: also compare with closed-form results.
  task automatic run_one(int ap, int unsigned len, bit busy_start);
    int a, b, p [4], q [9], mn, mx, ttv, sv;
    int mul_t, rc_t, x_t, t_t, h_t, h0v, h1v, c1, c2, sel, smin, smax, cyc, seen_done;
    int tt_b, s_b, e1, e2, e3, exp_out;
    a = $urandom_range(0, 255); b = $urandom_range(0, 255);
    mul_a = N'(a); mul_b = N'(b);
    foreach (p[i]) begin p[i] = $urandom_range(0, 255); rc_pix[i] = N'(p[i]); end
    mn = 255; mx = 0;
    begin
      int base, spread;
      base = $urandom_range(0, 255);
      spread = $urandom_range(0, 1) ? $urandom_range(0, 16) : 255;
      foreach (q[i]) begin
        q[i] = base + $urandom_range(0, spread) - spread / 2;
        if (q[i] < 0) q[i] = 0;
        if (q[i] > 255) q[i] = 255;
        bn_pix[i] = N'(q[i]);
        if (q[i] < mn) mn = q[i];
        if (q[i] > mx) mx = q[i];
      end
    end
    ttv = $urandom_range(40, 220); sv = $urandom_range(4, 40);
    bn_tt = N'(ttv); bn_s = N'(sv);
    approach = approach_e'(ap); bsl = LW'(len);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0; bsl = '1; approach = APPROACH_ROTATION;  // changes must not matter now
    mul_t = 0; rc_t = 0; x_t = 0; t_t = 0; h_t = 0; seen_done = -1;
    for (cyc = 1; cyc <= int'(len) + 1; cyc++) begin
      if (busy_start && cyc == 2) begin
        start = 1;
        n_busy_start++;
      end else start = 0;
      if (cyc <= int'(len)) begin
        int unsigned t = cyc - 1;
        c1 = ref_c1(t, N); c2 = ref_c2(ap, t, N);
        h0v = bitrev(c1, N); h1v = bitrev(c2, N);
        if (ap == 1 && c1 == 255) n_inhibit++;
        if (ap == 2 && c1 == 255) n_divstep++;
        if (ap == 0 && c2 == 254) n_prime_wrap++;
        sel = (h1v < (1 << (N - 1)));
        mul_t += (a > h0v) && (b > h1v);
        rc_t += sel ? ((p[2] > h0v) != (p[1] > h0v))
                    : ((p[0] > h0v) != (p[3] > h0v));
        smin = (mn > h0v); smax = (mx > h0v);
        x_t += (q[4] > h0v);
        t_t += sel ? smax : smin;
        h_t += smax ^ smin;
      end
      if (done) seen_done = cyc;
      @(negedge clk);
    end
    start = 0;
    if (done) seen_done = cyc;
    check(seen_done == int'(len) + 1, $sformatf("ap=%0d len=%0d done at %0d", ap, len, seen_done));
    check(mul_count == LW'(mul_t), $sformatf("ap=%0d mul %0d tally %0d", ap, mul_count, mul_t));
    check(rc_count == LW'(rc_t), $sformatf("ap=%0d rc %0d tally %0d", ap, rc_count, rc_t));
    check(bn_x_cnt == LW'(x_t) && bn_t_cnt == LW'(t_t) && bn_h_cnt == LW'(h_t),
          $sformatf("ap=%0d bernsen counts", ap));
    tt_b = (ttv * int'(len)) >> N; s_b = (sv * int'(len)) >> N;
    e1 = h_t > s_b; e2 = t_t > tt_b; e3 = x_t > t_t;
    exp_out = e1 ? e3 : e2;
    check(bn_out == 1'(exp_out), $sformatf("ap=%0d bernsen out", ap));
    if (len == 65536 || (ap == 0 && len == 65280)) begin
      check(mul_count == LW'(a * b), $sformatf("ap=%0d full product %0d*%0d = %0d", ap, a, b, mul_count));
      n_full++;
    end else n_trunc++;
    if (ap != 0 && len == 512) begin
      check(rc_count == LW'(absd(p[0], p[3]) + absd(p[2], p[1])), "exact Robert's cross at 2^(N+1)");
      check(bn_x_cnt == LW'(2 * q[4]) && bn_t_cnt == LW'(mn + mx) && bn_h_cnt == LW'(2 * (mx - mn)),
            "exact Bernsen counts at 2^(N+1)");
      if (mx - mn > sv) n_hi++; else n_lo++;
    end
    n_approach[ap]++;
  endtask

  initial begin
    foreach (rc_pix[i]) rc_pix[i] = '0;
    foreach (bn_pix[i]) bn_pix[i] = '0;
    foreach (n_approach[i]) n_approach[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ap = 0; ap < 3; ap++) begin
      run_one(ap, (ap == 0) ? 65280 : 65536, 1'b1);
      for (int r = 0; r < 12; r++) run_one(ap, 512, r == 0);
      run_one(ap, 256, 1'b0);
      run_one(ap, 1000, 1'b0);
      run_one(ap, 1, 1'b0);
    end
    foreach (n_approach[i]) check(n_approach[i] > 0, $sformatf("approach %0d used", i));
    check(n_full == 3, "full-period runs");
    check(n_trunc > 0, "truncated runs");
    check(n_busy_start > 0, "start while busy");
    check(n_inhibit > 0, "rotation inhibit");
    check(n_divstep > 0, "clock division step");
    check(n_prime_wrap > 0, "prime length restart");
    check(n_hi > 0 && n_lo > 0, "both Bernsen contrast branches");
    $display("approaches %0d/%0d/%0d full %0d truncated %0d busy-start %0d inhibit %0d divstep %0d prime-wrap %0d hi %0d lo %0d",
             n_approach[0], n_approach[1], n_approach[2], n_full, n_trunc, n_busy_start,
             n_inhibit, n_divstep, n_prime_wrap, n_hi, n_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
