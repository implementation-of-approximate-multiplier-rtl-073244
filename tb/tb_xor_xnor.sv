// tb_xor_xnor - exhaustive self-check of the XOR-XNOR cell.
// For each of the four input pairs, x must be 1 exactly when the inputs
// differ and xn exactly when they are equal.
`timescale 1ns/1ps
module tb_xor_xnor;
  logic a, b, x, xn;
  int checks = 0, failures = 0;

  xor_xnor dut (.a, .b, .x, .xn);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (x != (a != b)) begin
        failures++;
        $display("FAIL x: a=%0d b=%0d x=%0d", a, b, x);
      end
      checks++;
      if (xn != (a == b)) begin
        failures++;
        $display("FAIL xn: a=%0d b=%0d xn=%0d", a, b, xn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
