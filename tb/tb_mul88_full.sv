// tb_mul88_full - the 8x8 multiplier exactly as configured by default.
// Applies all 65,536 operand pairs to one multiplier with no parameter
// overrides and compares every product with the integer product a*b.
`timescale 1ns/1ps
module tb_mul88_full;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  mul88 dut (.a, .b, .p);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 20) $display("FAIL %0d*%0d = %0d, expected %0d", i, j, p, i * j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
