// tb_mul44_acc - exhaustive self-check of the exact 4x4 multiplier.
// Both compressor implementations are instantiated side by side and every
// one of the 256 operand pairs is compared with the integer product.
`timescale 1ns/1ps
module tb_mul44_acc;
  import mul_pkg::*;
  logic [3:0] a, b;
  logic [7:0] p_xm, p_fa;
  int checks = 0, failures = 0;

  mul44_acc                    dut_xm (.a, .b, .p(p_xm));
  mul44_acc #(.IMPL(CMP_FA))   dut_fa (.a, .b, .p(p_fa));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        int expected;
        a = 4'(i);
        b = 4'(j);
        #1;
        expected = i * j;
        checks++;
        if (int'(p_xm) != expected) begin
          failures++;
          $display("FAIL xor/mux: %0d*%0d = %0d, expected %0d", i, j, p_xm, expected);
        end
        checks++;
        if (int'(p_fa) != expected) begin
          failures++;
          $display("FAIL full-adder: %0d*%0d = %0d, expected %0d", i, j, p_fa, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
