// Top level of the multiplexer-based multipliers.
//
// Holds the two proposed multipliers side by side, each with its own ports:
// an 8x8 multiplier (four 4x1 multiplexers, four adders) and a 12x12
// multiplier (six 4x1 multiplexers, five adders). Both are unsigned and
// purely combinational: s8 = x8 * y8 and s12 = x12 * y12 follow their inputs
// after the combinational delay, and d8, d12 show the doubled multiplicands
// 2X that the multiplexers use. Placing both in one top is this design's own
// choice; they share nothing.
module mux_mult_top (
  input  logic [7:0]  x8,
  input  logic [7:0]  y8,
  output logic [8:0]  d8,
  output logic [15:0] s8,
  input  logic [11:0] x12,
  input  logic [11:0] y12,
  output logic [12:0] d12,
  output logic [23:0] s12
);

  multi_8_mux u_mult8 (
    .X (x8),
    .Y (y8),
    .D (d8),
    .S (s8)
  );

  multi_12_mux u_mult12 (
    .X (x12),
    .Y (y12),
    .D (d12),
    .S (s12)
  );

endmodule
