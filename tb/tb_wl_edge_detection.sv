// tb_wl_edge_detection: Robert's cross over a 128 x 128 image.
//
// The image is generated here (a shaded background with a bright disc, a dark
// rectangle and a band of stripes, 8-bit pixels). Every 2 x 2 window is run
// on the full-size engine with each SNG pair for 2^10 cycles, and the edge
// value count/L is read after 2^8, 2^9 and 2^10 cycles and compared with the
// binary result Z = 0.5(|X(i,j)-X(i+1,j+1)| + |X(i+1,j)-X(i,j+1)|) / 2^8.
// The mean absolute error over the image is printed in percent. Checks: with
// rotation and clock division the result is exact from 2^9 = 2^(N+1) cycles
// on (every window), and the prime length pair stays below 0.3% there.
module tb_wl_edge_detection;
  import dhs_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned LW = 2 * N + 1;
  localparam int unsigned IMG = 128;
  localparam int unsigned RUN = 1024;

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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Test image, 8-bit.
  function automatic int pixel(int i, int j);
    int v, di, dj;
    v = 40 + (i + j) / 2;                                  // shading
    di = i - 50; dj = j - 60;
    if (di * di + dj * dj < 900) v = 220;                  // disc
    if (i > 85 && i < 115 && j > 10 && j < 50) v = 15;     // rectangle
    if (j > 95 && ((i / 4) % 2 == 0)) v = v + 90;          // stripes
    if (v > 255) v = 255;
    return v;
  endfunction

  function automatic int absd(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real err [3][3];   // [approach][0: 2^8, 1: 2^9, 2: 2^10]
    int  wrong [3][3];
    int  windows;
    foreach (rc_pix[i]) rc_pix[i] = '0;
    foreach (bn_pix[i]) bn_pix[i] = '0;
    foreach (err[a, k]) begin err[a][k] = 0.0; wrong[a][k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    windows = (IMG - 1) * (IMG - 1);
    for (int ap = 0; ap < 3; ap++) begin
      for (int i = 0; i < IMG - 1; i++) begin
        for (int j = 0; j < IMG - 1; j++) begin
          int x00, x01, x10, x11, exact, k;
          x00 = pixel(i, j); x01 = pixel(i, j + 1); x10 = pixel(i + 1, j); x11 = pixel(i + 1, j + 1);
          rc_pix[0] = N'(x00); rc_pix[1] = N'(x01); rc_pix[2] = N'(x10); rc_pix[3] = N'(x11);
          exact = absd(x00, x11) + absd(x10, x01);      // = Z * 2^(N+1)
          approach = approach_e'(ap); bsl = LW'(RUN);
          start = 1; @(negedge clk); start = 0;
          k = 0;
          for (int unsigned c = 1; c <= RUN; c++) begin
            @(negedge clk);
            if (c == (256 << k)) begin
              real z, zr;
              z  = real'(rc_count) / real'(c);
              zr = real'(exact) / 512.0;
              err[ap][k] += (z > zr) ? z - zr : zr - z;
              if (rc_count * 512 != exact * c) wrong[ap][k]++;
              k++;
            end
          end
          @(negedge clk);
        end
      end
    end
    $display("Robert's cross on a %0dx%0d image: MAE (%%) against bit-stream length", IMG, IMG);
    $display("approach              2^10      2^9       2^8   (windows not exact at 2^10 / 2^9 / 2^8)");
    for (int ap = 0; ap < 3; ap++)
      $display("%s %9.4f %9.4f %9.4f   (%0d / %0d / %0d)",
               (ap == 0) ? "prime length   " : (ap == 1) ? "rotation       " : "clock division ",
               100.0 * err[ap][2] / windows, 100.0 * err[ap][1] / windows, 100.0 * err[ap][0] / windows,
               wrong[ap][2], wrong[ap][1], wrong[ap][0]);
    for (int ap = 1; ap < 3; ap++) begin
      check(wrong[ap][1] == 0, $sformatf("ap=%0d exact at 2^9", ap));
      check(wrong[ap][2] == 0, $sformatf("ap=%0d exact at 2^10", ap));
    end
    check(100.0 * err[0][1] / windows < 0.3, "prime length MAE at 2^9");
    check(wrong[1][0] > 0, "truncation below 2^(N+1) loses accuracy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
