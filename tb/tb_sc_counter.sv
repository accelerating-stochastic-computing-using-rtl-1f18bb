// tb_sc_counter: checks the stochastic-to-binary counter.
//
// Drives random bits with en randomly low for 5000 cycles and compares the
// count with a count kept by the testbench; also checks that clr empties it.
module tb_sc_counter;
  localparam int unsigned W = 17;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, bit_i = 0;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int unsigned model;

  sc_counter #(.W(W)) dut (.clk, .rst_n, .clr, .en, .bit_i, .count);

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
    for (int t = 0; t < 5000; t++) begin
      en = ($urandom_range(0, 7) != 0);
      bit_i = $urandom_range(0, 1);
      clr = (t == 2500);
      @(posedge clk);
      if (clr) model = 0;
      else if (en && bit_i) model++;
      @(negedge clk);
      checks++;
      if (count != W'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d count=%0d model=%0d", t, count, model);
      end
    end
    checks++;
    if (model < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
