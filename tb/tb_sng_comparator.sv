// tb_sng_comparator: exhaustive check of the binary-to-stochastic comparator.
//
// For every operand b the number of values h in [0, 2^N) that give a 1 must
// be b (the stream encodes b/2^N), and the output must be 1 exactly for the
// h values below b.
module tb_sng_comparator;
  localparam int unsigned N = 8;
  logic [N-1:0] b, h;
  logic bit_o;
  int checks = 0, failures = 0;

  sng_comparator #(.N(N)) dut (.b, .h, .bit_o);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int bi = 0; bi < (1 << N); bi++) begin
      int ones;
      ones = 0;
      for (int hi = 0; hi < (1 << N); hi++) begin
        b = N'(bi); h = N'(hi);
        #1;
        ones += int'(bit_o);
        if (hi < bi) begin
          checks++;
          if (bit_o !== 1'b1) begin failures++; $display("FAIL b=%0d h=%0d", bi, hi); end
        end
      end
      checks++;
      if (ones != bi) begin failures++; $display("FAIL b=%0d ones=%0d", bi, ones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
