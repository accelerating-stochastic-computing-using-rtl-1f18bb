// tb_wl_fault_tolerance: Bernsen binarization under bit-flip noise.
//
// The rotation pair is used at BSL = 2^(N+1), as in the noise study of the
// design. Noise is injected into the three bit-streams that enter the
// Bernsen counters (centre pixel, local threshold, contrast): in every cycle
// each of these bits is inverted with probability p, p = 0%, 10%, ... 50%.
// A 32 x 32 unevenly lit test image is binarized at each noise level, and
// the share of output pixels that differ from the binary Bernsen result is
// printed. Checks: no pixel differs without noise, the error stays below
// the 50% of a random guess up to 40% noise, and 50% noise (streams carrying
// no information) does cause errors.
module tb_wl_fault_tolerance;
  import dhs_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned LW = 2 * N + 1;
  localparam int unsigned IMG = 32;
  localparam int unsigned TT8 = 128, S8 = 40;

  logic clk = 0, rst_n = 0, start = 0;
  approach_e approach = APPROACH_ROTATION;
  logic [LW-1:0] bsl = '0;
  logic [N-1:0] zero = '0, bn_tt = N'(TT8), bn_s = N'(S8);
  logic [N-1:0] rc_pix [4];
  logic [N-1:0] bn_pix [9];
  logic busy, done, bn_out;
  logic [LW-1:0] mul_count, rc_count, bn_x_cnt, bn_t_cnt, bn_h_cnt;
  int checks = 0, failures = 0;
  int unsigned p_noise = 0;    // flip probability in 1/1000
  logic fx = 0, ft = 0, fh = 0;

  dhs_sc_top dut (
    .clk, .rst_n, .start, .approach, .bsl, .mul_a(zero), .mul_b(zero), .rc_pix, .bn_pix,
    .bn_tt, .bn_s, .busy, .done, .mul_count, .rc_count, .bn_x_cnt, .bn_t_cnt,
    .bn_h_cnt, .bn_out
  );

  always #5 clk = ~clk;

  // New flip decisions every cycle.
  always @(negedge clk) begin
    fx <= ($urandom_range(0, 999) < p_noise);
    ft <= ($urandom_range(0, 999) < p_noise);
    fh <= ($urandom_range(0, 999) < p_noise);
  end

  // Noisy streams into the counters.
  initial begin
    force dut.u_bn.u_cnt_x.bit_i = dut.u_bn.ps[4] ^ fx;
    force dut.u_bn.u_cnt_t.bit_i = dut.u_bn.t_bit ^ ft;
    force dut.u_bn.u_cnt_h.bit_i = dut.u_bn.h_bit ^ fh;
  end

  function automatic int pixel(int i, int j);
    int light, ink;
    light = 255 - (i + j) * 3;
    if (light < 60) light = 60;
    ink = ((i % 8) < 2 && j > 3 && j < 29) || ((j % 7) < 2 && i > 3 && i < 27);
    return ink ? light / 3 : light;
  endfunction

  function automatic int bernsen_ref(int i, int j);
    int mn, mx, v, x;
    mn = 256; mx = -1;
    for (int di = -1; di <= 1; di++)
      for (int dj = -1; dj <= 1; dj++) begin
        v = pixel(i + di, j + dj);
        if (v < mn) mn = v;
        if (v > mx) mx = v;
      end
    x = pixel(i, j);
    return (mx - mn > S8) ? (2 * x > mn + mx) : (mn + mx > 2 * TT8);
  endfunction

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int npix, wrong;
    foreach (rc_pix[i]) rc_pix[i] = '0;
    foreach (bn_pix[i]) bn_pix[i] = '0;
    npix = (IMG - 2) * (IMG - 2);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int lvl = 0; lvl <= 5; lvl++) begin
      p_noise = lvl * 100;
      wrong = 0;
      for (int i = 1; i < IMG - 1; i++)
        for (int j = 1; j < IMG - 1; j++) begin
          for (int di = -1; di <= 1; di++)
            for (int dj = -1; dj <= 1; dj++)
              bn_pix[(di + 1) * 3 + dj + 1] = N'(pixel(i + di, j + dj));
          bsl = LW'(1 << (N + 1));
          @(negedge clk); start = 1; @(negedge clk); start = 0;
          wait (done);
          @(negedge clk);
          if (int'(bn_out) != bernsen_ref(i, j)) wrong++;
        end
      $display("noise %2d%%: %6.2f%% of pixels differ from the binary result", lvl * 10, 100.0 * wrong / npix);
      checks++;
      if (lvl == 0 && wrong != 0) begin failures++; $display("FAIL: errors without noise"); end
      if (lvl != 0 && lvl < 5 && wrong * 2 >= npix) begin failures++; $display("FAIL: error at %0d%% noise", lvl * 10); end
      if (lvl == 5 && wrong == 0) begin failures++; $display("FAIL: noise has no effect"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
