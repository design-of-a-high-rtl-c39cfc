// Self-checking testbench of the multiple generator.
//
// Sweeps every multiplicand of the 8-bit and of the 12-bit generator and
// checks x1 = X, x2 = 2X and x3 = 3X against integer arithmetic done here.
module tb_multiple_gen;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [7:0]  x8;
  logic [9:0]  a1, a2, a3;
  logic [11:0] x12;
  logic [13:0] b1, b2, b3;

  multiple_gen dut8 (.x(x8), .x1(a1), .x2(a2), .x3(a3));
  multiple_gen #(.N(12)) dut12 (.x(x12), .x1(b1), .x2(b2), .x3(b3));

  task automatic check(input int got, input int want, input string what, input int x);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d got %0d want %0d", what, x, got, want);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x8 = '0;
    x12 = '0;
    for (int x = 0; x < 4096; x++) begin
      x12 = 12'(x);
      x8  = 8'(x);
      #1;
      check(int'(b1), x, "12b x1", x);
      check(int'(b2), 2 * x, "12b x2", x);
      check(int'(b3), 3 * x, "12b x3", x);
      if (x < 256) begin
        check(int'(a1), x, "8b x1", x);
        check(int'(a2), 2 * x, "8b x2", x);
        check(int'(a3), 3 * x, "8b x3", x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
