// tb_full_adder - exhaustive self-check of the one-bit full adder.
// All eight input combinations; the expected sum and carry are the two bits
// of the integer a+b+c.
`timescale 1ns/1ps
module tb_full_adder;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a, .b, .c, .s, .co);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, c} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if ({co, s} != 2'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d -> co=%0d s=%0d", a, b, c, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
