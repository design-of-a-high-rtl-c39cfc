// 4x1 multiplexer, the basic cell of the multiplexer-based multiplier.
//
// The 2-bit select input S1S0 picks one of four WIDTH-bit data inputs:
// data_in[0] for 00, data_in[1] for 01, data_in[2] for 10, data_in[3] for 11.
// In the multipliers the four inputs carry 0, X, 2X and 3X and the select is
// one 2-bit digit of the multiplier Y, so the output is that digit times X.
// The cell itself is a plain selector, as in the multiplier's description;
// WIDTH defaults to 10, the multiplexer width of the 8x8 multiplier (the
// 12x12 multiplier uses 14).
//
// Timing: purely combinational, no clock and no latency.
module mux4x1
  import mux_mult_pkg::*;
#(
  parameter int unsigned WIDTH = 10
) (
  input  sel_e             sel,          // control selector S1S0
  input  logic [WIDTH-1:0] data_in [4],  // inputs for codes 00, 01, 10, 11
  output logic [WIDTH-1:0] data_out
);

  always_comb begin
    unique case (sel)
      SEL_ZERO: data_out = data_in[0];
      SEL_X1:   data_out = data_in[1];
      SEL_X2:   data_out = data_in[2];
      SEL_X3:   data_out = data_in[3];
      default:  data_out = '0;
    endcase
  end

endmodule
