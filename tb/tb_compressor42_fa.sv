// tb_compressor42_fa - exhaustive self-check of compressor42_fa.
// Runs all 32 input combinations and checks
//   * the compressor equation x1+x2+x3+x4+cin = sum + 2*(carry+cout),
//   * that cout is the majority of x1, x2, x3 and so never depends on cin
//     (which is what lets a row of compressors avoid a rippling carry).
`timescale 1ns/1ps
module tb_compressor42_fa;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor42_fa dut (.x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int total, got;
      logic maj;
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      total = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
      got   = int'(sum) + 2 * (int'(carry) + int'(cout));
      maj   = (x1 & x2) | (x1 & x3) | (x2 & x3);
      checks++;
      if (got != total) begin
        failures++;
        $display("FAIL sum: in=%05b sum=%0d carry=%0d cout=%0d", 5'(v), sum, carry, cout);
      end
      checks++;
      if (cout != maj) begin
        failures++;
        $display("FAIL cout: in=%05b cout=%0d", 5'(v), cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
