// Self-checking testbench of the 12x12 multiplexer-based multiplier.
//
// First applies the eight operand pairs of the design's published simulation
// and compares S and D with the printed products and doubled multiplicands.
// Then checks S = X * Y and D = 2X for every Y with a set of edge
// multiplicands (0, 1, powers of two, all ones), and for 300,000 random
// operand pairs. Combinational: each result is checked 1 ns after its inputs.
module tb_multi_12_mux;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [11:0] X, Y;
  logic [12:0] D;
  logic [23:0] S;

  multi_12_mux dut (.X(X), .Y(Y), .D(D), .S(S));

  // Operands and results printed in the published 12x12 simulation.
  localparam int unsigned N_PUB = 8;
  localparam int unsigned PUB_X [N_PUB] = '{12, 60, 828, 956, 1980, 4028, 4092, 4095};
  localparam int unsigned PUB_Y [N_PUB] = '{661, 733, 989, 2013, 1983, 2037, 4085, 4095};
  localparam int unsigned PUB_D [N_PUB] = '{24, 120, 1656, 1912, 3960, 8056, 8184, 8190};
  localparam int unsigned PUB_S [N_PUB] = '{7932, 43980, 818892, 1924428, 3926340, 8205036,
                                           16715820, 16769025};

  task automatic apply(input int unsigned x, input int unsigned y,
                       input int unsigned want_s, input int unsigned want_d);
    X = 12'(x);
    Y = 12'(y);
    #1;
    checks++;
    if (S !== 24'(want_s) || D !== 13'(want_d)) begin
      failures++;
      if (failures < 10)
        $display("FAIL X=%0d Y=%0d: S=%0d (want %0d) D=%0d (want %0d)", X, Y, S, want_s, D, want_d);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned xs [6];
    xs = '{0, 1, 2, 2048, 2730, 4095};
    for (int i = 0; i < N_PUB; i++) apply(PUB_X[i], PUB_Y[i], PUB_S[i], PUB_D[i]);
    foreach (xs[k])
      for (int y = 0; y < 4096; y++) begin
        apply(xs[k], y, xs[k] * y, 2 * xs[k]);
        apply(y, xs[k], xs[k] * y, 2 * y);
      end
    for (int i = 0; i < 300000; i++) begin
      int unsigned x, y;
      x = $urandom_range(0, 4095);
      y = $urandom_range(0, 4095);
      apply(x, y, x * y, 2 * x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
