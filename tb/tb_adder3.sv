// Self-checking testbench of the three-operand adder.
//
// Adds corner values and random operands at the default 24-bit width; the
// expected sum is worked out with 64-bit integers and reduced modulo 2^24.
// The operands used by the 12x12 multiplier (pair sums at weights 1, 16 and
// 256) are among the random cases.
module tb_adder3;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [23:0] a, b, c, s;

  adder3 dut (.a(a), .b(b), .c(c), .sum(s));

  task automatic apply(input logic [23:0] va, input logic [23:0] vb, input logic [23:0] vc);
    longint unsigned want;
    a = va;
    b = vb;
    c = vc;
    #1;
    want = (longint'(va) + longint'(vb) + longint'(vc)) % (64'd1 << 24);
    checks++;
    if (s !== 24'(want)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d + %0d + %0d got %0d want %0d", va, vb, vc, s, want);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, 24'd1, '0);
    apply('0, '0, 24'd5);
    for (int i = 0; i < 20000; i++) apply(24'($urandom), 24'($urandom), 24'($urandom));
    for (int i = 0; i < 5000; i++)
      apply(24'($urandom_range(0, 61425)), 24'($urandom_range(0, 61425)) << 4,
            24'($urandom_range(0, 61425)) << 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
