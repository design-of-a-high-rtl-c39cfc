// 12x12-bit unsigned multiplier built from 4x1 multiplexers.
//
// Same scheme as the 8x8 multiplier, one size up. The multiplier Y is cut
// into six 2-bit digits; each selects 0, X, 2X or 3X (14 bits wide) in its
// own 4x1 multiplexer. Three binary adders each sum one pair of multiplexer
// outputs, the odd one shifted left by two:
//   pair k = mux(2k) + (mux(2k+1) << 2)     17-bit adder, k = 0, 1, 2
// and one more adder completes the product:
//   S = pair0 + (pair1 << 4) + (pair2 << 8)  24-bit three-operand adder
// The widths of the multiplexers (14 bits) and the number of adders follow
// the design's description; the pairing of multiplexers and the exact bit
// positions carry the 8x8 block diagram over to twelve bits, and building
// the last adder as a three-operand adder is this design's reading. A pair
// sum is at most 15 * 4095 = 61425, so its bit 16 is always zero and pair 2
// loses nothing when it is cut to 16 bits before the shift.
//
// Ports (names as in the design's simulation): X and Y the operands, S the
// 24-bit product, D the doubled multiplicand 2X. Operands are unsigned.
//
// Timing: purely combinational, no clock.
module multi_12_mux
  import mux_mult_pkg::*;
(
  input  logic [11:0] X,
  input  logic [11:0] Y,
  output logic [12:0] D,
  output logic [23:0] S
);

  localparam int unsigned N    = 12;
  localparam int unsigned MW   = N + 2;           // multiplexer width: 14
  localparam int unsigned PW   = MW + 3;          // pair sum width: 17
  localparam int unsigned NMUX = num_digits(N);   // 6 multiplexers

  logic [MW-1:0] x1, x2, x3;
  logic [MW-1:0] mux_in  [4];
  logic [MW-1:0] mux_out [NMUX];
  logic [PW-1:0] pair_sum [NMUX/2];

  multiple_gen #(.N(N)) u_gen (
    .x  (X),
    .x1 (x1),
    .x2 (x2),
    .x3 (x3)
  );

  assign D = x2[N:0];

  assign mux_in[0] = '0;
  assign mux_in[1] = x1;
  assign mux_in[2] = x2;
  assign mux_in[3] = x3;

  for (genvar i = 0; i < NMUX; i++) begin : g_mux
    mux4x1 #(.WIDTH(MW)) u_mux (
      .sel      (sel_e'(Y[2*i +: 2])),
      .data_in  (mux_in),
      .data_out (mux_out[i])
    );
  end

  for (genvar p = 0; p < NMUX/2; p++) begin : g_pair
    binary_adder #(.WIDTH(PW)) u_pair_add (
      .a   ({3'b000, mux_out[2*p]}),
      .b   ({1'b0, mux_out[2*p+1], 2'b00}),
      .sum (pair_sum[p])
    );
  end

  adder3 #(.WIDTH(2*N)) u_final_add (
    .a   ({7'd0, pair_sum[0]}),
    .b   ({3'd0, pair_sum[1], 4'd0}),
    .c   ({pair_sum[2][PW-2:0], 8'd0}),
    .sum (S)
  );

endmodule
