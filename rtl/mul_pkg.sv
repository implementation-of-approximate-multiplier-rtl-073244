// Shared types for the 4:2-compressor multiplier.
//
// compressor_impl_e picks how every exact 4:2 compressor in the design is
// built. Both forms compute the same function, x1+x2+x3+x4+cin =
// sum + 2*(carry+cout); they differ only in their gate structure:
//   CMP_XOR_MUX - two XOR-XNOR cells steering four 2:1 multiplexers, the
//                 compressor structure this design is built around.
//   CMP_FA      - the conventional form, two full adders in series.
package mul_pkg;
  typedef enum logic [0:0] {
    CMP_XOR_MUX = 1'b0,
    CMP_FA      = 1'b1
  } compressor_impl_e;
endpackage
