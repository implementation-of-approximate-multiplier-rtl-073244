// full_adder - one-bit full adder, i.e. a 3:2 compressor.
//
// Adds three bits of equal weight and returns a sum bit of that weight and a
// carry bit of twice the weight: a + b + c = s + 2*co. It is the building
// block of the conventional 4:2 compressor and of the partial-product trees.
// The gate equations (XOR for the sum, majority for the carry) are the
// textbook ones; only the function comes from the design description.
// Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (a & c) | (b & c);
  end
endmodule
