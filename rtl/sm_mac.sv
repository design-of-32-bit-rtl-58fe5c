// sm_mac: fixed-point multiplier-cum-accumulator, r = acc + x * y.
//
// x and y are N-bit sign-magnitude words ({sign, magnitude}); acc and r are
// 2N-bit two's complement values. Instead of forming the product and then
// adding it in a separate adder, the previous result enters the Dadda tree
// of the multiplier as one more partial-product row (dadda_mult with
// ACC_ROW = 1), so the whole operation is as deep as the multiplier alone.
//
// The product sign is handled around the tree with inversions only. With
// neg = sign(x) ^ sign(y) and M = |x| * |y|:
//   neg = 0:  r = M + acc
//   neg = 1:  r = acc - M = ~(M + ~acc)
// so the tree always adds the unsigned magnitude product to acc ^ {neg}, and
// the tree's output is inverted again when neg is set. The result wraps
// modulo 2**2N. Purely combinational.
//
// Adding the previous MAC result as a partial product of the present
// multiplication follows the published design; the sign handling by
// inverting the addend and the result is this design's own choice.
module sm_mac #(
  parameter int unsigned N = mac_pkg::DATA_W
) (
  input  logic [N-1:0]   x,    // {sign, magnitude}
  input  logic [N-1:0]   y,    // {sign, magnitude}
  input  logic [2*N-1:0] acc,  // value to add to, two's complement
  output logic [2*N-1:0] r     // acc + x * y, two's complement
);

  logic [N-1:0]   xm, ym;   // zero-extended magnitudes
  logic           neg;      // sign of the product
  logic [2*N-1:0] row;      // acc, inverted when the product is negative
  logic [2*N-1:0] t;        // |x|*|y| + row

  assign xm  = {1'b0, x[N-2:0]};
  assign ym  = {1'b0, y[N-2:0]};
  assign neg = x[N-1] ^ y[N-1];
  assign row = acc ^ {(2*N){neg}};

  dadda_mult #(.N(N), .ACC_ROW(1'b1)) u_dadda (
    .a      (xm),
    .b      (ym),
    .addend (row),
    .p      (t)
  );

  assign r = t ^ {(2*N){neg}};

endmodule : sm_mac
