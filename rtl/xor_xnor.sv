// xor_xnor - XOR-XNOR cell.
//
// Produces both the XOR and the XNOR of two bits at once. In the
// multiplexer-based 4:2 compressor these two complementary outputs drive
// the data inputs and select lines of the following multiplexers, so no
// separate inverter is needed. At transistor level such a cell shares
// devices between its two outputs; here it is written as logic.
// Interface: a, b in; x = a ^ b, xn = ~(a ^ b). Combinational.
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic x,
  output logic xn
);
  always_comb begin
    x  = a ^ b;
    xn = ~(a ^ b);
  end
endmodule
