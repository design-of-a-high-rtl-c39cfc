// Multiple generator: makes the data inputs of the 4x1 multiplexers.
//
// From the N-bit multiplicand X it forms three (N+2)-bit values:
//   x1 = X with two zero MSBs,
//   x2 = 2X, X with a zero appended as LSB (no logic, only wiring),
//   x3 = 3X, the sum of the (N+1)-bit operands {0,X} and {X,0} in one
//        binary adder with an (N+2)-bit result.
// These are the 01, 10 and 11 inputs of every multiplexer; the 00 input is
// zero. Only 3X costs an adder, and it is shared by all multiplexers. The
// structure and widths follow the multiplier's block diagram (9-bit adder
// operands and a 10-bit sum for N = 8, 14-bit multiplexer inputs for N = 12).
//
// Timing: purely combinational.
module multiple_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  output logic [N+1:0] x1,
  output logic [N+1:0] x2,
  output logic [N+1:0] x3
);

  logic [N:0] op_x;    // X with a zero MSB
  logic [N:0] op_2x;   // X with a zero LSB

  assign op_x  = {1'b0, x};
  assign op_2x = {x, 1'b0};

  assign x1 = {1'b0, op_x};
  assign x2 = {1'b0, op_2x};

  binary_adder #(.WIDTH(N + 2)) u_add3x (
    .a   ({1'b0, op_x}),
    .b   ({1'b0, op_2x}),
    .sum (x3)
  );

endmodule
