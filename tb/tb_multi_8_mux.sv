// Self-checking testbench of the 8x8 multiplexer-based multiplier.
//
// First applies the eight operand pairs of the design's published simulation
// and compares S and D with the printed products and doubled multiplicands.
// Then sweeps all 65,536 operand pairs and checks S = X * Y and D = 2X
// against integer arithmetic. The circuit is combinational: every result is
// checked 1 ns after its inputs change, i.e. a new product on every step.
module tb_multi_8_mux;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [7:0]  X, Y;
  logic [8:0]  D;
  logic [15:0] S;

  multi_8_mux dut (.X(X), .Y(Y), .D(D), .S(S));

  // Operands and results printed in the published 8x8 simulation.
  localparam int unsigned N_PUB = 8;
  localparam int unsigned PUB_X [N_PUB] = '{13, 47, 95, 137, 148, 186, 231, 255};
  localparam int unsigned PUB_Y [N_PUB] = '{11, 27, 55, 117, 213, 221, 253, 255};
  localparam int unsigned PUB_D [N_PUB] = '{26, 94, 190, 274, 296, 372, 462, 510};
  localparam int unsigned PUB_S [N_PUB] = '{143, 1269, 5225, 16029, 31524, 41106, 58443, 65025};

  task automatic check(input int unsigned want_s, input int unsigned want_d);
    checks++;
    if (S !== 16'(want_s) || D !== 9'(want_d)) begin
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
    for (int i = 0; i < N_PUB; i++) begin
      X = 8'(PUB_X[i]);
      Y = 8'(PUB_Y[i]);
      #1;
      check(PUB_S[i], PUB_D[i]);
    end
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        X = 8'(x);
        Y = 8'(y);
        #1;
        check(x * y, 2 * x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
