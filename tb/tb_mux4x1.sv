// Self-checking testbench of the 4x1 multiplexer.
//
// Drives the four data inputs with random values and steps the select code
// through 00, 01, 10, 11; the output must equal the input that the code
// names. Two widths are tested: 10 bits (the default) and 14 bits. The cell
// is combinational, so each check is made 1 ns after the inputs change.
module tb_mux4x1;
  import mux_mult_pkg::*;

  int unsigned checks = 0;
  int unsigned failures = 0;

  sel_e        sel;
  logic [9:0]  din10 [4];
  logic [9:0]  dout10;
  logic [13:0] din14 [4];
  logic [13:0] dout14;

  mux4x1 dut10 (.sel(sel), .data_in(din10), .data_out(dout10));
  mux4x1 #(.WIDTH(14)) dut14 (.sel(sel), .data_in(din14), .data_out(dout14));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = SEL_ZERO;
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < 4; k++) begin
        din10[k] = 10'($urandom);
        din14[k] = 14'($urandom);
      end
      for (int s = 0; s < 4; s++) begin
        sel = sel_e'(s);
        #1;
        checks += 2;
        if (dout10 !== din10[s]) begin
          failures++;
          if (failures < 10) $display("FAIL w10 sel=%0d got %h want %h", s, dout10, din10[s]);
        end
        if (dout14 !== din14[s]) begin
          failures++;
          if (failures < 10) $display("FAIL w14 sel=%0d got %h want %h", s, dout14, din14[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
