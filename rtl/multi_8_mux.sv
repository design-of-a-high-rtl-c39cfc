// 8x8-bit unsigned multiplier built from 4x1 multiplexers.
//
// The multiplier Y is cut into four 2-bit digits Y[1:0], Y[3:2], Y[5:4] and
// Y[7:6]. Each digit selects, in its own 4x1 multiplexer, one of the four
// multiples 0, X, 2X, 3X of the multiplicand (10 bits wide; 3X comes from the
// one adder in multiple_gen). All four multiplexers switch at the same time,
// so the partial products are ready after one multiplexer delay instead of a
// chain of adder rows. They are then summed in a two-level tree:
//   pair 0 = mux0 + (mux1 << 2)        13-bit binary adder
//   pair 1 = mux2 + (mux3 << 2)        13-bit binary adder
//   S      = pair0 + (pair1 << 4)      16-bit binary adder
// Four adders in all, counting the 3X adder. Bit positions follow the block
// diagram of the design: multiplexer bits 11:10 or 1:0 are tied to zero,
// pair 0 is extended with zeros in bits 15:13 and pair 1 gets four zero LSBs.
// A pair sum is at most 15 * 255 = 3825, so its bit 12 is always zero and
// pair 1 loses nothing when it is cut to 12 bits before the shift.
//
// Ports (names as in the design's simulation): X and Y the operands, S the
// 16-bit product, D the doubled multiplicand 2X that feeds the 10 inputs.
// The document gives no sign handling: operands are unsigned.
//
// Timing: purely combinational, one result per input change, no clock.
module multi_8_mux
  import mux_mult_pkg::*;
(
  input  logic [7:0]  X,
  input  logic [7:0]  Y,
  output logic [8:0]  D,
  output logic [15:0] S
);

  localparam int unsigned N    = 8;
  localparam int unsigned MW   = N + 2;           // multiplexer width: 10
  localparam int unsigned PW   = MW + 3;          // pair sum width: 13
  localparam int unsigned NMUX = num_digits(N);   // 4 multiplexers

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

  // Even multiplexer at weight 0, odd one two bits up, within each pair.
  for (genvar p = 0; p < NMUX/2; p++) begin : g_pair
    binary_adder #(.WIDTH(PW)) u_pair_add (
      .a   ({3'b000, mux_out[2*p]}),
      .b   ({1'b0, mux_out[2*p+1], 2'b00}),
      .sum (pair_sum[p])
    );
  end

  binary_adder #(.WIDTH(2*N)) u_final_add (
    .a   ({3'b000, pair_sum[0]}),
    .b   ({pair_sum[1][PW-2:0], 4'b0000}),
    .sum (S)
  );

endmodule
