// bernsen_logic: output stage of the stochastic Bernsen binarizer.
//
// OUT = EN1*EN3 + not(EN1)*EN2. EN1 tells whether the local contrast is high;
// if it is, the pixel is classified against the local threshold (EN3),
// otherwise the local threshold is classified against the global one (EN2).
// This is a 2:1 multiplexer with EN1 as select. Combinational.
module bernsen_logic (
  input  logic en1,
  input  logic en2,
  input  logic en3,
  output logic out
);

  assign out = (en1 & en3) | (~en1 & en2);

endmodule
