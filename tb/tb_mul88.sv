// tb_mul88 - end-to-end self-check of the 8x8 multiplier.
//
// Two copies of the multiplier run side by side, one with the default
// XOR-XNOR/multiplexer compressors and one with full-adder compressors. All
// 65,536 operand pairs are applied and each product is compared with the
// integer product a*b.
//
// The test also counts, for each copy, how often the mechanisms of the
// design were exercised, and fails if one never was:
//   * chain : a compressor of the product row passed cout into the cin of
//             the next column,
//   * carry : the compressor row produced a carry bit that the final adder
//             had to add,
//   * ovf   : a nibble product reached 8 bits (>= 128), filling a column of
//             the compressor row four deep,
//   * full  : all four nibble products were non-zero at once.
`timescale 1ns/1ps
module tb_mul88;
  import mul_pkg::*;
  logic [7:0]  a, b;
  logic [15:0] p_xm, p_fa;
  int checks = 0, failures = 0;
  int n_chain[2], n_carry[2], n_ovf[2], n_full[2];

  mul88                  dut_xm (.a, .b, .p(p_xm));
  mul88 #(.IMPL(CMP_FA)) dut_fa (.a, .b, .p(p_fa));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] got, input int expected, input string name);
    checks++;
    if (int'(got) != expected) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: %0d*%0d = %0d, expected %0d", name, a, b, got, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        check(p_xm, i * j, "xor/mux");
        check(p_fa, i * j, "full-adder");
        if (dut_xm.cin_chain != '0) n_chain[0]++;
        if (dut_fa.cin_chain != '0) n_chain[1]++;
        if (dut_xm.carry_row != '0) n_carry[0]++;
        if (dut_fa.carry_row != '0) n_carry[1]++;
        if (dut_xm.p_hh[7] | dut_xm.p_hl[7] | dut_xm.p_lh[7] | dut_xm.p_ll[7]) n_ovf[0]++;
        if (dut_fa.p_hh[7] | dut_fa.p_hl[7] | dut_fa.p_lh[7] | dut_fa.p_ll[7]) n_ovf[1]++;
        if (dut_xm.p_hh != 0 && dut_xm.p_hl != 0 && dut_xm.p_lh != 0 && dut_xm.p_ll != 0) n_full[0]++;
        if (dut_fa.p_hh != 0 && dut_fa.p_hl != 0 && dut_fa.p_lh != 0 && dut_fa.p_ll != 0) n_full[1]++;
      end
    end
    for (int k = 0; k < 2; k++) begin
      $display("%s: chain=%0d carry=%0d ovf=%0d full=%0d", k == 0 ? "xor/mux" : "full-adder",
               n_chain[k], n_carry[k], n_ovf[k], n_full[k]);
      checks++;
      if (n_chain[k] == 0) begin failures++; $display("FAIL: cout->cin chaining never happened"); end
      checks++;
      if (n_carry[k] == 0) begin failures++; $display("FAIL: compressor carry never happened"); end
      checks++;
      if (n_ovf[k] == 0)   begin failures++; $display("FAIL: 8-bit nibble product never happened"); end
      checks++;
      if (n_full[k] == 0)  begin failures++; $display("FAIL: all four sub-products never active"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
