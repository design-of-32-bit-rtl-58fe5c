// cla_lcu4: 4-bit lookahead carry unit, the building cell of cla64bit.
//
// Given the propagate/generate pairs of four adjacent bits (or of four
// adjacent groups) and the carry into the lowest one, it produces the carry
// into each of the four in parallel, plus the group propagate and generate
// that the next level of the lookahead tree consumes. Purely combinational.
//   c[0] = ci
//   c[k] = g[k-1] | p[k-1]&g[k-2] | ... | p[k-1]&...&p[0]&ci
//   gp   = &p,   gg = carry out of the group with ci = 0
// The two-level sum-of-products form is the textbook lookahead equation.
module cla_lcu4 (
  input  logic [3:0] p,   // propagate of each bit / subgroup
  input  logic [3:0] g,   // generate of each bit / subgroup
  input  logic       ci,  // carry into bit / subgroup 0
  output logic [3:0] c,   // carry into each bit / subgroup
  output logic       gp,  // group propagate
  output logic       gg   // group generate
);

  always_comb begin
    c[0] = ci;
    c[1] = g[0] | (p[0] & ci);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & ci);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & ci);
    gp   = &p;
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  end

endmodule : cla_lcu4
