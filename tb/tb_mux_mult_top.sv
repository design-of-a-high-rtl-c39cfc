// End-to-end testbench of the multiplexer-based multiplier top level, with
// the top at its default configuration.
//
// Drives the 8x8 and the 12x12 multiplier at the same time: first the eight
// operand pairs of each published simulation (checked against the printed
// products and doubled multiplicands), then random operands plus directed
// ones, checked against integer multiplication. Both multipliers must work
// independently, so their operands are drawn separately.
//
// Every multiplexer has four cases: select 00 (zero), 01 (X), 10 (2X) and
// 11 (3X, through the adder). The testbench counts how often each case was
// taken by each of the 4 + 6 multiplexers (each is driven by one 2-bit digit
// of Y) and counts a failure for any case that never happened. It also
// counts products that reach the top bit of the result.
module tb_mux_mult_top;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [7:0]  x8, y8;
  logic [8:0]  d8;
  logic [15:0] s8;
  logic [11:0] x12, y12;
  logic [12:0] d12;
  logic [23:0] s12;

  int unsigned case8  [4][4];   // [multiplexer][select code]
  int unsigned case12 [6][4];
  int unsigned top_bit8 = 0;
  int unsigned top_bit12 = 0;

  mux_mult_top dut (
    .x8 (x8), .y8 (y8), .d8 (d8), .s8 (s8),
    .x12(x12), .y12(y12), .d12(d12), .s12(s12)
  );

  localparam int unsigned PUB8_X  [8] = '{13, 47, 95, 137, 148, 186, 231, 255};
  localparam int unsigned PUB8_Y  [8] = '{11, 27, 55, 117, 213, 221, 253, 255};
  localparam int unsigned PUB8_S  [8] = '{143, 1269, 5225, 16029, 31524, 41106, 58443, 65025};
  localparam int unsigned PUB12_X [8] = '{12, 60, 828, 956, 1980, 4028, 4092, 4095};
  localparam int unsigned PUB12_Y [8] = '{661, 733, 989, 2013, 1983, 2037, 4085, 4095};
  localparam int unsigned PUB12_S [8] = '{7932, 43980, 818892, 1924428, 3926340, 8205036,
                                         16715820, 16769025};

  task automatic apply(input int unsigned a8, input int unsigned b8, input int unsigned p8,
                       input int unsigned a12, input int unsigned b12, input int unsigned p12);
    x8  = 8'(a8);
    y8  = 8'(b8);
    x12 = 12'(a12);
    y12 = 12'(b12);
    #1;
    checks += 2;
    if (s8 !== 16'(p8) || d8 !== 9'(2 * a8)) begin
      failures++;
      if (failures < 10) $display("FAIL 8x8 %0d*%0d: S=%0d want %0d, D=%0d", x8, y8, s8, p8, d8);
    end
    if (s12 !== 24'(p12) || d12 !== 13'(2 * a12)) begin
      failures++;
      if (failures < 10) $display("FAIL 12x12 %0d*%0d: S=%0d want %0d, D=%0d", x12, y12, s12, p12, d12);
    end
    for (int m = 0; m < 4; m++) case8[m][(b8 >> (2 * m)) & 3]++;
    for (int m = 0; m < 6; m++) case12[m][(b12 >> (2 * m)) & 3]++;
    if (s8[15]) top_bit8++;
    if (s12[23]) top_bit12++;
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (case8[m, c]) case8[m][c] = 0;
    foreach (case12[m, c]) case12[m][c] = 0;

    // Published operand pairs, both multipliers side by side.
    for (int i = 0; i < 8; i++)
      apply(PUB8_X[i], PUB8_Y[i], PUB8_S[i], PUB12_X[i], PUB12_Y[i], PUB12_S[i]);

    // Directed: zero, one and full-scale operands.
    apply(0, 255, 0, 0, 4095, 0);
    apply(255, 0, 0, 4095, 0, 0);
    apply(1, 170, 170, 1, 2730, 2730);
    apply(255, 85, 255 * 85, 4095, 1365, 4095 * 1365);

    // Random operands.
    for (int i = 0; i < 50000; i++) begin
      int unsigned a8, b8, a12, b12;
      a8  = $urandom_range(0, 255);
      b8  = $urandom_range(0, 255);
      a12 = $urandom_range(0, 4095);
      b12 = $urandom_range(0, 4095);
      apply(a8, b8, a8 * b8, a12, b12, a12 * b12);
    end

    // Every multiplexer case must have been exercised.
    foreach (case8[m, c]) begin
      checks++;
      if (case8[m][c] == 0) begin
        failures++;
        $display("FAIL 8x8 multiplexer %0d never took select %0d", m, c);
      end
    end
    foreach (case12[m, c]) begin
      checks++;
      if (case12[m][c] == 0) begin
        failures++;
        $display("FAIL 12x12 multiplexer %0d never took select %0d", m, c);
      end
    end
    checks += 2;
    if (top_bit8 == 0) failures++;
    if (top_bit12 == 0) failures++;
    $display("8x8 multiplexer 0 select counts 00/01/10/11: %0d %0d %0d %0d",
             case8[0][0], case8[0][1], case8[0][2], case8[0][3]);
    $display("12x12 multiplexer 5 select counts 00/01/10/11: %0d %0d %0d %0d",
             case12[5][0], case12[5][1], case12[5][2], case12[5][3]);
    $display("products using the top result bit: 8x8 %0d, 12x12 %0d", top_bit8, top_bit12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
