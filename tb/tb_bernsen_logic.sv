// tb_bernsen_logic: exhaustive check of OUT = EN1*EN3 + not(EN1)*EN2,
// written here as a table: with EN1 set the output follows EN3, else EN2.
module tb_bernsen_logic;
  logic en1, en2, en3, out;
  int checks = 0, failures = 0;
  // expected[{en1,en2,en3}]
  localparam logic [7:0] Expected = 8'b1010_1100;

  bernsen_logic dut (.en1, .en2, .en3, .out);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {en1, en2, en3} = 3'(i);
      #1;
      checks++;
      if (out != Expected[i]) begin failures++; $display("FAIL en=%b out=%b", 3'(i), out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
