// Self-checking testbench of the binary parallel adder.
//
// Adds corner values (zero, all ones, carries through every bit) and random
// operands at the default 13-bit width and at 16 bits; the expected sum is
// worked out with 32-bit integers and reduced modulo 2^WIDTH.
module tb_binary_adder;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [12:0] a13, b13, s13;
  logic [15:0] a16, b16, s16;

  binary_adder dut13 (.a(a13), .b(b13), .sum(s13));
  binary_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .sum(s16));

  task automatic apply(input int unsigned a, input int unsigned b);
    a13 = 13'(a);
    b13 = 13'(b);
    a16 = 16'(a);
    b16 = 16'(b);
    #1;
    checks += 2;
    if (s13 !== 13'((a % 8192) + (b % 8192))) begin
      failures++;
      if (failures < 10) $display("FAIL 13b %0d + %0d got %0d", a13, b13, s13);
    end
    if (s16 !== 16'((a % 65536) + (b % 65536))) begin
      failures++;
      if (failures < 10) $display("FAIL 16b %0d + %0d got %0d", a16, b16, s16);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0);
    apply(32'hffff, 1);
    apply(32'hffff, 32'hffff);
    apply(32'h0fff, 1);
    for (int i = 0; i < 16; i++) apply((1 << i) - 1, 1);
    for (int i = 0; i < 20000; i++) apply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
