// mac_pkg: widths shared by the complex multiply-accumulate unit.
//
// Operands are 32-bit fixed-point words in sign-magnitude form: bit 31 is
// the sign, bits 30:0 the magnitude. Products and accumulated results are
// 64-bit two's complement values. The 32/64 widths are the published ones;
// the sign-magnitude coding follows the {sign, magnitude} notation used for
// the operands, and the two's complement result coding is this design's
// own choice.
package mac_pkg;

  localparam int unsigned DATA_W = 32;          // operand width
  localparam int unsigned ACC_W  = 2 * DATA_W;  // product / accumulator width

endpackage : mac_pkg
