// mux2 - one-bit 2:1 multiplexer: y = sel ? d1 : d0. Combinational.
// Helper cell for the multiplexer-based 4:2 compressor.
module mux2 (
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic y
);
  always_comb y = sel ? d1 : d0;
endmodule
