// compressor42_xm - exact 4:2 compressor from XOR-XNOR cells and multiplexers.
//
// Same function and ports as compressor42_fa:
//     x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout),
// built from two XOR-XNOR cells and four 2:1 multiplexers:
//   * xor_xnor(x1,x2) gives s12 and its complement, xor_xnor(x3,x4) gives s34
//     and its complement.
//   * cout  = s12 ? x3 : x1          (if x1 = x2 their common value is the
//                                     carry of x1+x2+x3, otherwise x3 is)
//   * t     = s12 ? ~s34 : s34       (t = x1^x2^x3^x4, chosen between the
//                                     two outputs of the second cell)
//   * sum   = t ? ~cin : cin
//   * carry = t ? cin : x4
// The block structure (two XOR-XNOR cells, a multiplexer giving cout, a
// middle multiplexer feeding the sum and carry multiplexers, x4 and cin
// reaching the carry multiplexer) follows the design's logic decomposition;
// which signal selects each multiplexer is chosen here so that the equation
// above holds. Combinational, no clock.
module compressor42_xm (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s12, s12_n, s34, s34_n, t, cin_n;

  xor_xnor u_xx12 (.a(x1), .b(x2), .x(s12), .xn(s12_n));
  xor_xnor u_xx34 (.a(x3), .b(x4), .x(s34), .xn(s34_n));

  assign cin_n = ~cin;

  mux2 u_mux_cout  (.d0(x1),  .d1(x3),    .sel(s12), .y(cout));
  mux2 u_mux_mid   (.d0(s34), .d1(s34_n), .sel(s12), .y(t));
  mux2 u_mux_sum   (.d0(cin), .d1(cin_n), .sel(t),   .y(sum));
  mux2 u_mux_carry (.d0(x4),  .d1(cin),   .sel(t),   .y(carry));

  // s12_n is the cell's complementary output; the multiplexers here only
  // need the true polarity of the first cell.
  logic unused_s12_n;
  assign unused_s12_n = s12_n;
endmodule
