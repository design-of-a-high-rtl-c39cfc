// Binary parallel adder of two WIDTH-bit unsigned operands.
//
// sum = a + b, modulo 2^WIDTH. The multipliers zero-extend their operands so
// that WIDTH always holds the full sum and no carry is lost. The adder is
// written as a behavioural '+', leaving the carry structure to synthesis; the
// multiplier's description names binary parallel adders but not their
// insides. WIDTH defaults to 13, the width of the adders that sum a pair of
// multiplexer outputs in the 8x8 multiplier.
//
// Timing: purely combinational.
module binary_adder #(
  parameter int unsigned WIDTH = 13
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);

  assign sum = a + b;

endmodule
