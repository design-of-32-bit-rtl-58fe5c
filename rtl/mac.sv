// mac: 32-bit fixed-point complex multiply-accumulate unit.
//
// With the operands (P + jQ) = (a + jb) and (R + jS) = (x + jy), every
// rising clock edge adds their complex product to the two accumulators:
//   realp <= realp + (P*R - Q*S)
//   imgp  <= imgp  + (P*S + Q*R)
// The product is computed directly with four multipliers (the four-product
// form of complex multiplication), which lets all multiplications start at
// once. Each half is a cmac_lane: two 32 x 32 Dadda multipliers with sign
// handling, a 64-bit carry look-ahead adder that subtracts (real) or adds
// (imaginary) the two products, and a second 64-bit CLA that adds the term
// to the accumulator register.
//
// FUSED selects how the accumulation is built (see cmac_lane). By default
// (FUSED = 0) each lane adds its term to the accumulator with a separate
// CLA, as in the published block diagram of the 32-bit unit. FUSED = 1
// builds the multiplier-cum-accumulator form also described for the unit:
// the previous result enters the Dadda tree of the P*R (real) or P*S
// (imaginary) multiplier as an extra partial product, removing one adder
// from the path. Both forms give identical results cycle for cycle.
//
// Interface: a, b, x, y are 32-bit sign-magnitude words (bit 31 = sign,
// bits 30:0 = magnitude); realp and imgp are 64-bit two's complement
// registers. reset is synchronous and active high and clears both. Timing:
// the operands present before an edge are accumulated at that edge; there is
// no pipeline, so the clock period covers multiplier, adder and accumulator
// adder. Accumulators wrap modulo 2**64.
//
// Port names and widths, the datapath and the a/b/x/y-to-P/Q/R/S mapping
// follow the published unit; reset style, number coding of the results and
// wrap-around are this design's own choices.
module mac #(
  parameter int unsigned N     = mac_pkg::DATA_W,
  parameter bit          FUSED = 1'b0  // 1: multiplier-cum-accumulator form
) (
  input  logic [N-1:0]   a,      // P: real part of the first operand
  input  logic [N-1:0]   b,      // Q: imaginary part of the first operand
  input  logic [N-1:0]   x,      // R: real part of the second operand
  input  logic [N-1:0]   y,      // S: imaginary part of the second operand
  input  logic           clock,
  input  logic           reset,  // synchronous, active high
  output logic [2*N-1:0] imgp,   // accumulated imaginary part
  output logic [2*N-1:0] realp   // accumulated real part
);

  // Real part: P*R - Q*S (P*R is the fused product when FUSED = 1)
  cmac_lane #(.N(N), .SUBTRACT(1'b1), .FUSED(FUSED)) u_real (
    .clock (clock),
    .reset (reset),
    .a0    (a),
    .b0    (x),
    .a1    (b),
    .b1    (y),
    .acc   (realp)
  );

  // Imaginary part: P*S + Q*R (P*S is the fused product when FUSED = 1)
  cmac_lane #(.N(N), .SUBTRACT(1'b0), .FUSED(FUSED)) u_imag (
    .clock (clock),
    .reset (reset),
    .a0    (a),
    .b0    (y),
    .a1    (b),
    .b1    (x),
    .acc   (imgp)
  );

endmodule : mac
