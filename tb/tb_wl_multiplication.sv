// tb_wl_multiplication: multiplication accuracy against bit-stream length.
//
// Multiplies random pairs of 8-bit operands on the full-size engine with each
// SNG pair and reads the product count after every power-of-two truncation
// (2^8 ... 2^16 cycles; for the prime length pair k*(2^8-1) cycles with
// k = 2^0 ... 2^8, reported against the same power of two). The mean absolute
// error of count/L against a*b/F is printed per length, in percent, F being
// the full period (2^16, or 2^8*(2^8-1) for the prime pair, whose second
// stream encodes b/(2^8-1)).
// Checks: the error is exactly 0 at the full period, and it shrinks to the
// levels expected of Halton streams (prime length and rotation below 0.25% at
// 2^11 and below 0.03% at 2^13; clock division below 0.3% at 2^15), which is
// the progressive precision that lets a run stop early.
module tb_wl_multiplication;
  import dhs_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned LW = 2 * N + 1;
  localparam int unsigned PAIRS = 48;

  logic clk = 0, rst_n = 0, start = 0;
  approach_e approach = APPROACH_PRIME;
  logic [LW-1:0] bsl = '0;
  logic [N-1:0] mul_a = '0, mul_b = '0, bn_tt = '0, bn_s = '0;
  logic [N-1:0] rc_pix [4];
  logic [N-1:0] bn_pix [9];
  logic busy, done, bn_out;
  logic [LW-1:0] mul_count, rc_count, bn_x_cnt, bn_t_cnt, bn_h_cnt;
  int checks = 0, failures = 0;

  dhs_sc_top dut (
    .clk, .rst_n, .start, .approach, .bsl, .mul_a, .mul_b, .rc_pix, .bn_pix,
    .bn_tt, .bn_s, .busy, .done, .mul_count, .rc_count, .bn_x_cnt, .bn_t_cnt,
    .bn_h_cnt, .bn_out
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real err_sum [3][9];   // [approach][k], k = log2(L) - 8
    real mae;
    int unsigned full, lens [9];
    foreach (rc_pix[i]) rc_pix[i] = '0;
    foreach (bn_pix[i]) bn_pix[i] = '0;
    foreach (err_sum[a, k]) err_sum[a][k] = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ap = 0; ap < 3; ap++) begin
      for (int k = 0; k < 9; k++) lens[k] = (ap == 0) ? (255 << k) : (256 << k);
      full = lens[8];
      for (int pr = 0; pr < PAIRS; pr++) begin
        int a, b, kk;
        a = (pr == 0) ? 255 : $urandom_range(0, 255);
        b = (pr == 0) ? 255 : $urandom_range(0, 255);
        mul_a = N'(a); mul_b = N'(b);
        approach = approach_e'(ap); bsl = LW'(full);
        start = 1; @(negedge clk); start = 0;
        kk = 0;
        // after j run cycles the count holds j bits
        for (int unsigned j = 1; j <= full; j++) begin
          @(negedge clk);
          if (j == lens[kk]) begin
            real est, ideal;
            est = real'(mul_count) / real'(j);
            ideal = real'(a * b) / real'(full);   // b/255 for the prime pair
            err_sum[ap][kk] += (est > ideal) ? est - ideal : ideal - est;
            if (j == full)
              check(mul_count == LW'(a * b), $sformatf("ap=%0d exact %0d*%0d gave %0d", ap, a, b, mul_count));
            kk++;
          end
        end
        @(negedge clk);
        check(!busy, "idle after run");
      end
    end
    $display("MAE (%%) of the product against bit-stream length");
    $display("approach          2^16      2^15      2^14      2^13      2^12      2^11      2^10      2^9       2^8");
    for (int ap = 0; ap < 3; ap++) begin
      string line;
      line = (ap == 0) ? "prime length   " : (ap == 1) ? "rotation       " : "clock division ";
      for (int k = 8; k >= 0; k--) line = {line, $sformatf(" %9.4f", 100.0 * err_sum[ap][k] / PAIRS)};
      $display("%s", line);
    end
    for (int ap = 0; ap < 3; ap++) begin
      mae = 100.0 * err_sum[ap][8] / PAIRS;
      check(mae == 0.0, $sformatf("ap=%0d MAE at full length %f", ap, mae));
    end
    for (int ap = 0; ap < 2; ap++) begin
      check(100.0 * err_sum[ap][3] / PAIRS < 0.25, $sformatf("ap=%0d MAE at 2^11", ap));
      check(100.0 * err_sum[ap][5] / PAIRS < 0.03, $sformatf("ap=%0d MAE at 2^13", ap));
    end
    check(100.0 * err_sum[2][7] / PAIRS < 0.3, "clock division MAE at 2^15");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
