// tb_run_ctrl: checks the bit-stream length controller.
//
// For several lengths (0, 1, 7, 512, 1000) it counts the run cycles, checks
// that clr comes with the accepted start, that done pulses exactly bsl+1
// cycles after start and only once, and that a start while busy is ignored.
module tb_run_ctrl;
  localparam int unsigned LW = 17;
  logic clk = 0, rst_n = 0, start = 0;
  logic [LW-1:0] bsl = '0, len;
  logic clr, run, busy, done;
  int checks = 0, failures = 0;

  run_ctrl #(.LW(LW)) dut (.clk, .rst_n, .start, .bsl, .clr, .run, .busy, .done, .len);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned lens [5] = '{0, 1, 7, 512, 1000};
    int runs, cyc, dones, done_at;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !run && !done && !clr, "idle after reset");
    foreach (lens[i]) begin
      bsl = LW'(lens[i]); start = 1;
      #1 check(clr, "clr with accepted start");
      @(negedge clk); start = 0; bsl = '1;
      check(len == LW'(lens[i]), "len latched");
      runs = 0; dones = 0; done_at = -1; cyc = 1;
      while (cyc < lens[i] + 10) begin
        if (cyc == 3 && lens[i] > 5) start = 1;   // start while busy: ignored
        if (cyc == 4) start = 0;
        if (cyc == 3 && lens[i] > 5) begin #1 check(busy && !clr, "no clr while busy"); end
        if (run) runs++;
        if (done) begin dones++; done_at = cyc; end
        @(negedge clk); cyc++;
      end
      check(runs == lens[i], $sformatf("run cycles %0d for bsl %0d", runs, lens[i]));
      check(dones == 1 && done_at == lens[i] + 1,
            $sformatf("done %0d times at %0d for bsl %0d", dones, done_at, lens[i]));
      check(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
