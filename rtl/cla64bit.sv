// cla64bit: carry look-ahead adder, s = a + b + cin (64 bits by default).
//
// Each bit forms propagate p = a ^ b and generate g = a & b. A tree of
// 4-bit lookahead carry units (cla_lcu4) then works in two sweeps: upward,
// each unit folds four (p, g) pairs into one group pair; downward, each unit
// turns the carry into its group into the carry of each of its four
// children. For 64 bits the tree has three levels (16 + 4 + 1 units), so
// every carry is known after a logarithmic number of gate levels instead of
// rippling. The sum bit is s[i] = p[i] ^ c[i]. Purely combinational.
//
// The name, the 64-bit width and the ports cin, a, b, s, cout follow the
// published adder symbol; the radix-4 lookahead tree is this design's own
// choice of carry look-ahead structure. Widths that are not a power of four
// are padded internally with bits that neither generate nor propagate.
module cla64bit #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             cin,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  // Number of lookahead levels and the padded width 4**LEVELS.
  function automatic int unsigned levels_for(int unsigned w);
    int unsigned l = 1;
    int unsigned span = 4;
    while (span < w) begin
      span = span * 4;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = levels_for(WIDTH);
  localparam int unsigned PW     = 4 ** LEVELS;

  // pl/gl[l]: propagate/generate of the groups at level l (level 0 = bits).
  // cl[l]   : carry into each group at level l.
  // Level l has PW / 4**l groups; the unused upper entries are tied to zero.
  logic [PW-1:0] pl [LEVELS+1];
  logic [PW-1:0] gl [LEVELS+1];
  logic [PW-1:0] cl [LEVELS+1];

  if (PW > WIDTH) begin : g_pad
    assign pl[0] = {{(PW-WIDTH){1'b0}}, a ^ b};
    assign gl[0] = {{(PW-WIDTH){1'b0}}, a & b};
  end else begin : g_nopad
    assign pl[0] = a ^ b;
    assign gl[0] = a & b;
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned NG = PW / (4 ** l);  // groups at this level
    for (genvar j = 0; j < NG; j++) begin : g_unit
      cla_lcu4 u_lcu (
        .p  (pl[l-1][4*j +: 4]),
        .g  (gl[l-1][4*j +: 4]),
        .ci (cl[l][j]),
        .c  (cl[l-1][4*j +: 4]),
        .gp (pl[l][j]),
        .gg (gl[l][j])
      );
    end
    if (NG < PW) begin : g_unused
      assign pl[l][PW-1:NG] = '0;
      assign gl[l][PW-1:NG] = '0;
    end
    if (l < LEVELS) begin : g_unused_c
      assign cl[l][PW-1:NG] = '0;
    end
  end

  assign cl[LEVELS][0]      = cin;
  assign cl[LEVELS][PW-1:1] = '0;

  assign s = pl[0][WIDTH-1:0] ^ cl[0][WIDTH-1:0];

  if (PW > WIDTH) begin : g_cout_pad
    assign cout = cl[0][WIDTH];
  end else begin : g_cout
    assign cout = gl[LEVELS][0] | (pl[LEVELS][0] & cin);
  end

endmodule : cla64bit
