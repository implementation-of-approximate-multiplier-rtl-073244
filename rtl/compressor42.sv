// compressor42 - exact 4:2 compressor, implementation chosen by parameter.
//
// Wraps compressor42_xm (XOR-XNOR/multiplexer form, default) or
// compressor42_fa (two full adders in series). Both satisfy
//     x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)
// and cout never depends on cin. Combinational.
module compressor42
  import mul_pkg::*;
#(
  parameter compressor_impl_e IMPL = CMP_XOR_MUX
) (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  if (IMPL == CMP_FA) begin : g_fa
    compressor42_fa u_cmp (.x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);
  end else begin : g_xm
    compressor42_xm u_cmp (.x1, .x2, .x3, .x4, .cin, .sum, .carry, .cout);
  end
endmodule
