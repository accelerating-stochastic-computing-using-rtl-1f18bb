// tb_halton_counter: checks the base-2 Halton generator.
//
// Two instances: a full 2^N counter and one restarting after 2^N-2. For 1200
// cycles each state and bit-reversed output is compared with t mod period.
// Also checks that en low holds the state, that clr restarts it, and the
// low-discrepancy property: the first 2^k outputs are exactly the multiples
// of 2^(N-k).
module tb_halton_counter;
  import dhs_ref_pkg::*;
  localparam int unsigned N = 8;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [N-1:0] ca, ha, cb, hb;
  int checks = 0, failures = 0;

  halton_counter #(.N(N))                        dut_a (.clk, .rst_n, .clr, .en, .count(ca), .halton(ha));
  halton_counter #(.N(N), .LAST((1 << N) - 2))   dut_b (.clk, .rst_n, .clr, .en, .count(cb), .halton(hb));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [256];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ca == 0 && cb == 0, "reset state");
    en = 1;
    for (int t = 0; t < 1200; t++) begin
      check(ca == N'(t % 256) && ha == N'(bitrev(t % 256, N)), $sformatf("full counter t=%0d", t));
      check(cb == N'(t % 255) && hb == N'(bitrev(t % 255, N)), $sformatf("prime counter t=%0d", t));
      @(negedge clk);
    end
    // hold
    en = 0;
    begin
      logic [N-1:0] keep;
      keep = ca;
      repeat (3) @(negedge clk);
      check(ca == keep, "en low holds state");
    end
    // clr
    en = 1; clr = 1; @(negedge clk); clr = 0;
    check(ca == 0 && cb == 0, "clr restarts");
    // first 2^k outputs are the multiples of 2^(N-k)
    for (int k = 1; k <= 4; k++) begin
      clr = 1; @(negedge clk); clr = 0;
      foreach (seen[i]) seen[i] = 0;
      for (int t = 0; t < (1 << k); t++) begin seen[ha] = 1; @(negedge clk); end
      for (int j = 0; j < (1 << k); j++)
        check(seen[j << (N - k)], $sformatf("k=%0d value %0d present", k, j << (N - k)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
