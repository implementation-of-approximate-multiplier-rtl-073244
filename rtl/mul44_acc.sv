// mul44_acc - exact 4x4-bit unsigned multiplier with a 4:2-compressor tree.
//
// The sixteen partial products pp[i][j] = a[j] & b[i] (weight i+j) form
// columns of height 1,2,3,4,3,2,1. One reduction stage brings every column
// to at most two bits:
//   column 2: full adder on its three bits
//   column 3: 4:2 compressor on its four bits (cin = 0)
//   column 4: 4:2 compressor on its three bits plus the carry of column 3,
//             cin = cout of column 3
//   column 5: 4:2 compressor on its two bits plus the carry of column 4,
//             x4 = 0, cin = cout of column 4
//   column 6: full adder on a3&b3 and the carry and cout of column 5
// The two remaining rows are added by a carry-propagate adder. The choice
// of exact compressors (no approximation) and this column allocation are
// this design's own; the design description only names the block as the
// accurate 4x4 multiplier built with 4:2 compressors.
// Interface: a, b (4 bits each) in, p = a*b (8 bits) out. Combinational.
module mul44_acc
  import mul_pkg::*;
#(
  parameter compressor_impl_e IMPL = CMP_XOR_MUX
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0][3:0] pp;   // pp[i][j] = a[j] & b[i], weight i+j

  always_comb begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        pp[i][j] = a[j] & b[i];
  end

  logic s2, c2;
  logic s3, k3, o3;      // sum, carry, cout of the column-3 compressor
  logic s4, k4, o4;
  logic s5, k5, o5;
  logic s6, c6;

  full_adder u_fa_c2 (.a(pp[0][2]), .b(pp[1][1]), .c(pp[2][0]), .s(s2), .co(c2));

  compressor42 #(.IMPL(IMPL)) u_cmp_c3 (
    .x1(pp[0][3]), .x2(pp[1][2]), .x3(pp[2][1]), .x4(pp[3][0]), .cin(1'b0),
    .sum(s3), .carry(k3), .cout(o3));

  compressor42 #(.IMPL(IMPL)) u_cmp_c4 (
    .x1(pp[1][3]), .x2(pp[2][2]), .x3(pp[3][1]), .x4(k3), .cin(o3),
    .sum(s4), .carry(k4), .cout(o4));

  compressor42 #(.IMPL(IMPL)) u_cmp_c5 (
    .x1(pp[2][3]), .x2(pp[3][2]), .x3(k4), .x4(1'b0), .cin(o4),
    .sum(s5), .carry(k5), .cout(o5));

  full_adder u_fa_c6 (.a(pp[3][3]), .b(k5), .c(o5), .s(s6), .co(c6));

  // Two rows left: everything above plus the second bits of columns 1 and 3.
  logic [7:0] row0, row1;
  assign row0 = {c6, s6, s5, s4, s3, s2, pp[0][1], pp[0][0]};
  assign row1 = {4'b0, c2, 1'b0, pp[1][0], 1'b0};

  assign p = row0 + row1;
endmodule
