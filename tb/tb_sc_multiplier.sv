// tb_sc_multiplier: checks the AND multiplier and its counter.
//
// Drives random stream pairs (with biased densities) and compares the
// product bit and the count with the testbench's own tally; a clr in the
// middle restarts the count.
module tb_sc_multiplier;
  localparam int unsigned W = 17;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, bs0 = 0, bs1 = 0, prod;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int unsigned model;

  sc_multiplier #(.W(W)) dut (.clk, .rst_n, .clr, .en, .bs0, .bs1, .prod, .count);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      en  = ($urandom_range(0, 9) != 0);
      bs0 = ($urandom_range(0, 3) != 0);
      bs1 = ($urandom_range(0, 2) == 0);
      clr = (t == 2000);
      #1;
      checks++;
      if (prod != (bs0 && bs1)) begin failures++; $display("FAIL prod t=%0d", t); end
      @(posedge clk);
      if (clr) model = 0;
      else if (en && bs0 && bs1) model++;
      @(negedge clk);
      checks++;
      if (count != W'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d count=%0d model=%0d", t, count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
