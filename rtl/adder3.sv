// Three-operand adder: the last summation stage of the 12x12 multiplier.
//
// The 12x12 multiplier has three pair sums left after its pair adders; one
// more adder combines them: sum = a + b + c, modulo 2^WIDTH. Treating that
// last adder as a single three-operand adder is this design's reading; it is
// written behaviourally, so synthesis may build it as a carry-save stage and
// one carry-propagate adder. WIDTH defaults to 24, the 12x12 product width.
//
// Timing: purely combinational.
module adder3 #(
  parameter int unsigned WIDTH = 24
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] sum
);

  assign sum = a + b + c;

endmodule
