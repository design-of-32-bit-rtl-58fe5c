// cmac_lane: one half (real or imaginary) of the complex multiply-accumulate.
//
// Two sign-magnitude products are combined by a cla64bit adder and the
// result is accumulated:
//   SUBTRACT = 1:  acc += a0*b0 - a1*b1   (real part,      P.R - Q.S)
//   SUBTRACT = 0:  acc += a0*b0 + a1*b1   (imaginary part, P.S + Q.R)
// Subtraction is done in the adder as a + ~b + 1 (inverted operand, carry in
// set). Two ways of accumulating are built, chosen by FUSED:
//   FUSED = 0 (default): both products come from sm_multiplier; their
//     sum/difference goes to an accumulator (a second CLA adder feeding the
//     register back to itself).
//   FUSED = 1: the first product comes from sm_mac, a multiplier-cum-
//     accumulator that adds the register value inside its Dadda tree; the
//     combining CLA then yields the new register value directly, so no
//     separate accumulator adder is needed.
// Both give the same results. The path from the operands to the register is
// purely combinational: one new term is taken on every rising clock edge and
// shows in acc after that edge. A synchronous, active-high reset clears acc;
// the value wraps modulo 2**(2N).
//
// The two multipliers, the add/subtract CLA, the accumulating CLA plus
// register (FUSED = 0) and the multiplier-cum-accumulator (FUSED = 1) follow
// the published designs; the two's complement arithmetic and the absence of
// pipeline registers are this design's own choices.
module cmac_lane #(
  parameter int unsigned N        = mac_pkg::DATA_W,
  parameter bit          SUBTRACT = 1'b1,
  parameter bit          FUSED    = 1'b0
) (
  input  logic           clock,
  input  logic           reset,
  input  logic [N-1:0]   a0,   // operands of the first product
  input  logic [N-1:0]   b0,
  input  logic [N-1:0]   a1,   // operands of the second product
  input  logic [N-1:0]   b1,
  output logic [2*N-1:0] acc   // accumulated result, two's complement
);

  logic [2*N-1:0] prod0, prod1, addend, term;
  logic           term_cout;  // not used: wraps like the accumulator

  if (FUSED) begin : g_fused
    // prod0 = acc + a0*b0, formed inside the Dadda tree
    sm_mac #(.N(N)) u_mca (.x(a0), .y(b0), .acc(acc), .r(prod0));
  end else begin : g_separate
    sm_multiplier #(.N(N)) u_mul0 (.x(a0), .y(b0), .p(prod0));
  end

  sm_multiplier #(.N(N)) u_mul1 (.x(a1), .y(b1), .p(prod1));

  assign addend = SUBTRACT ? ~prod1 : prod1;

  cla64bit #(.WIDTH(2*N)) u_combine (
    .cin  (SUBTRACT),
    .a    (prod0),
    .b    (addend),
    .s    (term),
    .cout (term_cout)
  );

  if (FUSED) begin : g_fused_reg
    // the combined value already includes the previous result
    always_ff @(posedge clock) begin
      if (reset) acc <= '0;
      else       acc <= term;
    end
  end else begin : g_separate_acc
    accumulator #(.WIDTH(2*N)) u_acc (
      .clock (clock),
      .reset (reset),
      .d     (term),
      .q     (acc)
    );
  end

endmodule : cmac_lane
