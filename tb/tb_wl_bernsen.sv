// tb_wl_bernsen: Bernsen binarization of an unevenly lit image at bit-widths
// 4 to 8.
//
// A 48 x 48 test image is generated here: dark strokes on a light page under
// illumination that falls off from one corner, 8-bit pixels. For each
// bit-width NB = 4..8 one engine with N = NB processes every interior 3 x 3
// window with each SNG pair for BSL = 2^(NB+1) cycles, pixels and thresholds
// reduced to NB bits. Checks: with rotation and clock division the output of
// every pixel equals Bernsen's rule evaluated in integers at NB bits. Printed
// per width and pair: the share of pixels that differ from the 8-bit binary
// result (the error measure behind the bit-width study).
module tb_wl_bernsen;
  import dhs_pkg::*;
  localparam int unsigned IMG = 48;
  localparam int unsigned TT8 = 128;   // global threshold, 8-bit
  localparam int unsigned S8  = 40;    // contrast threshold, 8-bit

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit lane_done [4:8];

  always #5 clk = ~clk;

  function automatic int pixel(int i, int j);
    int light, ink;
    light = 255 - (i + j) * 2;                             // uneven lighting
    if (light < 60) light = 60;
    ink = ((i % 12) < 2 && j > 4 && j < 44) ||             // horizontal strokes
          ((j % 10) < 2 && i > 6 && i < 40);               // vertical strokes
    return ink ? light / 3 : light;
  endfunction

  // Bernsen's rule in integers on NB-bit pixels (units 1/2^NB, counts doubled).
  function automatic int bernsen_ref(int nb, int i, int j);
    int mn, mx, v, x, tt, s;
    mn = 1 << nb; mx = -1;
    for (int di = -1; di <= 1; di++)
      for (int dj = -1; dj <= 1; dj++) begin
        v = pixel(i + di, j + dj) >> (8 - nb);
        if (v < mn) mn = v;
        if (v > mx) mx = v;
      end
    x = pixel(i, j) >> (8 - nb);
    tt = TT8 >> (8 - nb); s = S8 >> (8 - nb);
    return (2 * (mx - mn) > 2 * s) ? (2 * x > mn + mx) : (mn + mx > 2 * tt);
  endfunction

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar NB = 4; NB <= 8; NB++) begin : g_width
    localparam int unsigned LW = 2 * NB + 1;
    logic start = 0;
    approach_e approach = APPROACH_ROTATION;
    logic [LW-1:0] bsl = '0;
    logic [NB-1:0] zero = '0, bn_tt = '0, bn_s = '0;
    logic [NB-1:0] rc_pix [4];
    logic [NB-1:0] bn_pix [9];
    logic busy, done, bn_out;
    logic [LW-1:0] mul_count, rc_count, bn_x_cnt, bn_t_cnt, bn_h_cnt;

    dhs_sc_top #(.N(NB)) dut (
      .clk, .rst_n, .start, .approach, .bsl, .mul_a(zero), .mul_b(zero), .rc_pix, .bn_pix,
      .bn_tt, .bn_s, .busy, .done, .mul_count, .rc_count, .bn_x_cnt, .bn_t_cnt,
      .bn_h_cnt, .bn_out
    );

    initial begin
      int diff8 [3], mism [3], npix;
      foreach (rc_pix[i]) rc_pix[i] = '0;
      foreach (bn_pix[i]) bn_pix[i] = '0;
      foreach (diff8[a]) begin diff8[a] = 0; mism[a] = 0; end
      lane_done[NB] = 0;
      npix = (IMG - 2) * (IMG - 2);
      bn_tt = NB'(TT8 >> (8 - NB)); bn_s = NB'(S8 >> (8 - NB));
      wait (rst_n);
      for (int ap = 0; ap < 3; ap++) begin
        for (int i = 1; i < IMG - 1; i++) begin
          for (int j = 1; j < IMG - 1; j++) begin
            for (int di = -1; di <= 1; di++)
              for (int dj = -1; dj <= 1; dj++)
                bn_pix[(di + 1) * 3 + dj + 1] = NB'(pixel(i + di, j + dj) >> (8 - NB));
            approach = approach_e'(ap); bsl = LW'(1 << (NB + 1));
            @(negedge clk); start = 1; @(negedge clk); start = 0;
            wait (done);
            @(negedge clk);
            if (int'(bn_out) != bernsen_ref(NB, i, j)) mism[ap]++;
            if (int'(bn_out) != bernsen_ref(8, i, j)) diff8[ap]++;
          end
        end
      end
      $display("bit-width %0d: pixels differing from the 8-bit binary result (%%): prime %6.2f rotation %6.2f clock division %6.2f; differing from the %0d-bit rule: %0d / %0d / %0d",
               NB, 100.0 * diff8[0] / npix, 100.0 * diff8[1] / npix, 100.0 * diff8[2] / npix,
               NB, mism[0], mism[1], mism[2]);
      checks += 2;
      if (mism[1] != 0) begin failures++; $display("FAIL: rotation differs at width %0d", NB); end
      if (mism[2] != 0) begin failures++; $display("FAIL: clock division differs at width %0d", NB); end
      if (NB == 8) begin
        checks++;
        if (diff8[1] != 0) failures++;
      end
      lane_done[NB] = 1;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (lane_done[4] && lane_done[5] && lane_done[6] && lane_done[7] && lane_done[8]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
