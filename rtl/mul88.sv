// mul88 - 8x8-bit unsigned multiplier built from four 4x4 sub-multipliers.
//
// Each operand is split into a high and a low nibble, a = {ah, al} and
// b = {bh, bl}, and the product is assembled recursively:
//     a*b = (ah*bh << 8) + (ah*bl << 4) + (al*bh << 4) + al*bl.
// The four nibble products come from four mul44_acc instances. Over bit
// columns 4..15 the four shifted products are at most four bits deep, so one
// row of 4:2 compressors (cout of each column chained into cin of the next)
// reduces them to a sum row and a carry row; bits 0..3 are al*bl's low bits
// unchanged. A 16-bit carry-propagate adder then forms the product.
//
// The design this follows computes only the most significant nibble product
// (ah*bh) with the accurate 4x4 multiplier and the three less significant
// ones with approximate 4x4 multipliers. Those approximate multipliers are not
// specified, so all four positions use the exact mul44_acc here and the
// product is exact; swapping u_hl, u_lh and u_ll for an approximate 4x4 block
// with the same ports is all an approximate variant needs.
//
// Parameter IMPL selects the 4:2 compressor structure used throughout
// (mul_pkg::CMP_XOR_MUX by default, or CMP_FA); it does not change results.
// Interface: a, b (8 bits) in, p = a*b (16 bits) out. Combinational, no
// clock and no latency.
module mul88
  import mul_pkg::*;
#(
  parameter compressor_impl_e IMPL = CMP_XOR_MUX
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] p_hh, p_hl, p_lh, p_ll;

  // Most significant sub-product: always the accurate multiplier.
  mul44_acc #(.IMPL(IMPL)) u_hh (.a(a[7:4]), .b(b[7:4]), .p(p_hh));
  // Less significant sub-products.
  mul44_acc #(.IMPL(IMPL)) u_hl (.a(a[7:4]), .b(b[3:0]), .p(p_hl));
  mul44_acc #(.IMPL(IMPL)) u_lh (.a(a[3:0]), .b(b[7:4]), .p(p_lh));
  mul44_acc #(.IMPL(IMPL)) u_ll (.a(a[3:0]), .b(b[3:0]), .p(p_ll));

  // The four rows over columns 4..15, aligned to their weights.
  logic [15:4] r0, r1, r2, r3;
  assign r0 = {8'b0, p_ll[7:4]};
  assign r1 = {4'b0, p_hl};
  assign r2 = {4'b0, p_lh};
  assign r3 = {p_hh, 4'b0};

  logic [15:4] sum_row, carry_row, cout_row;
  logic [16:4] cin_chain;
  assign cin_chain[4] = 1'b0;

  for (genvar i = 4; i < 16; i++) begin : g_col
    compressor42 #(.IMPL(IMPL)) u_cmp (
      .x1(r0[i]), .x2(r1[i]), .x3(r2[i]), .x4(r3[i]), .cin(cin_chain[i]),
      .sum(sum_row[i]), .carry(carry_row[i]), .cout(cout_row[i]));
    assign cin_chain[i+1] = cout_row[i];
  end

  // carry_row[i] and cout_row[i] weigh 2^(i+1). Those of column 15 weigh
  // 2^16 and are always 0 because a*b < 2^16.
  logic [15:0] sum_vec, carry_vec;
  assign sum_vec   = {sum_row, p_ll[3:0]};
  assign carry_vec = {carry_row[14:4], 5'b0};

  logic unused_top;
  assign unused_top = carry_row[15] ^ cin_chain[16];

  assign p = sum_vec + carry_vec;
endmodule
