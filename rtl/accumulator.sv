// accumulator: WIDTH-bit accumulate register with its carry look-ahead adder.
//
// On every rising clock edge the register loads q + d, the sum formed by a
// cla64bit adder whose second input is the register's own output (the
// feedback loop of the MAC). A synchronous, active-high reset clears the
// register to zero. The value wraps modulo 2**WIDTH; the adder's carry out
// is not kept. Latency: d presented before edge k appears in q after edge k.
//
// The adder-plus-register loop and the 64-bit width follow the published
// design; the reset style, accumulating on every edge (there is no enable
// port) and wrap-around on overflow are this design's own choices.
module accumulator #(
  parameter int unsigned WIDTH = mac_pkg::ACC_W
) (
  input  logic             clock,
  input  logic             reset,  // synchronous, active high
  input  logic [WIDTH-1:0] d,      // term to add (two's complement)
  output logic [WIDTH-1:0] q       // accumulated value
);

  logic [WIDTH-1:0] sum;
  logic             sum_cout;  // carry out of the top bit, dropped (wrap)

  cla64bit #(.WIDTH(WIDTH)) u_add (
    .cin  (1'b0),
    .a    (q),
    .b    (d),
    .s    (sum),
    .cout (sum_cout)
  );

  always_ff @(posedge clock) begin
    if (reset) q <= '0;
    else       q <= sum;
  end

endmodule : accumulator
