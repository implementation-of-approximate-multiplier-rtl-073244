// compressor42_fa - exact 4:2 compressor from two cascaded full adders.
//
// Takes four bits x1..x4 of one column plus cin from the column below and
// returns sum (same weight) and carry and cout (both double weight):
//     x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
// The first full adder adds x1, x2, x3; its carry leaves as cout and its sum
// goes to the second full adder together with x4 and cin, which yields sum
// and carry. cout does not depend on cin, so when compressors are chained
// along a row (cout of column i into cin of column i+1) no carry ripples
// through more than one compressor. Combinational.
module compressor42_fa (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(x1), .b(x2), .c(x3),  .s(s1),  .co(cout));
  full_adder u_fa2 (.a(s1), .b(x4), .c(cin), .s(sum), .co(carry));
endmodule
