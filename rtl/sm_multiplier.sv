// sm_multiplier: fixed-point multiplier for sign-magnitude operands.
//
// Each N-bit operand is {sign, magnitude}: bit N-1 is the sign, bits N-2:0
// the magnitude. The unit has the three parts of the fixed-point multiplier:
//   - partial product generation and reduction: the magnitudes, zero-extended
//     to N bits, are multiplied by the N x N Dadda tree (dadda_mult);
//   - sign calculation: the product is negative when exactly one operand
//     sign is set;
//   - carry look-ahead addition: the magnitude product is turned into a
//     2N-bit two's complement value as (prod ^ {2N{neg}}) + neg, the +neg
//     coming in through the carry input of a cla64bit adder.
// The output is therefore ready for the two's complement CLA adders and the
// accumulator that follow. A zero magnitude gives 0 whatever the signs.
// Purely combinational.
//
// The sign-magnitude operand format and the Dadda/CLA structure follow the
// published design; producing a two's complement product (rather than a
// sign-magnitude one) is this design's own choice.
module sm_multiplier #(
  parameter int unsigned N = mac_pkg::DATA_W
) (
  input  logic [N-1:0]   x,  // {sign, magnitude}
  input  logic [N-1:0]   y,  // {sign, magnitude}
  output logic [2*N-1:0] p   // signed product, two's complement
);

  logic [N-1:0]   xm, ym;   // zero-extended magnitudes
  logic [2*N-1:0] mprod;    // magnitude product
  logic           neg;      // sign of the product
  logic [2*N-1:0] flipped;
  logic           neg_cout;

  assign xm  = {1'b0, x[N-2:0]};
  assign ym  = {1'b0, y[N-2:0]};
  assign neg = x[N-1] ^ y[N-1];

  dadda_mult #(.N(N)) u_dadda (
    .a      (xm),
    .b      (ym),
    .addend ('0),
    .p      (mprod)
  );

  assign flipped = mprod ^ {(2*N){neg}};

  // The carry out is never needed: the magnitude product is below 2**(2N-2).
  cla64bit #(.WIDTH(2*N)) u_negate (
    .cin  (neg),
    .a    (flipped),
    .b    ('0),
    .s    (p),
    .cout (neg_cout)
  );

endmodule : sm_multiplier
