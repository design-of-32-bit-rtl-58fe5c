// dadda_mult: unsigned N x N Dadda tree multiplier, p = a * b (N = 32),
// optionally fused with an addend: p = a * b + addend (mod 2**2N).
//
// The multiplier works in the three steps of the Dadda method:
//   1. Partial products: the N*N bits a[i] & b[j] are formed and placed in
//      column i+j, giving the triangular (diamond) dot diagram whose tallest
//      column holds N bits. With ACC_ROW = 1 the 2N-bit addend is placed
//      in the diagram as one more row (bit addend[k] in column k), so the addition
//      costs no separate adder: this is the "multiplier-cum-accumulator"
//      form, where a previous result enters the tree like a partial product.
//   2. Reduction: a series of stages lowers the tallest column to the Dadda
//      heights ..., 28, 19, 13, 9, 6, 4, 3, 2 (d1 = 2, d(k+1) = floor(1.5 dk)).
//      In each stage, a column is reduced only as far as needed to meet that
//      stage's target height: a full adder removes two bits from its column,
//      a half adder one bit, and each carry lands in the next column in the
//      same stage. For N = 32 there are eight stages (with or without the
//      addend row).
//   3. Final addition: the two remaining rows are summed by the carry
//      look-ahead adder cla64bit (2N bits wide).
// The per-column adder counts of every stage are computed at elaboration
// time by the constant function make_plan(), so the tree is built for any
// N >= 3. Purely combinational; no clock. With ACC_ROW = 0 the input addend is
// not read (the port is kept so both forms share one interface).
//
// The Dadda method, the 32-bit width, the final CLA addition and the idea of
// adding a previous result as an extra partial product follow the published
// design; the exact placement of bits inside a column (pass-through bits
// first, then sums, then incoming carries) is this design's own choice.
module dadda_mult #(
  parameter int unsigned N       = 32,
  parameter bit          ACC_ROW = 1'b0   // 1: add addend into the tree
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [2*N-1:0] addend,  // used only when ACC_ROW = 1
  output logic [2*N-1:0] p
);

  localparam int unsigned W  = 2 * N;              // product / column count
  localparam int unsigned HM = N + int'(ACC_ROW);  // tallest column

  // k-th Dadda height: 2, 3, 4, 6, 9, 13, 19, 28, 42, ...
  function automatic int dseq(int k);
    int d = 2;
    for (int i = 1; i < k; i++) d = (d * 3) / 2;
    return d;
  endfunction

  // Number of reduction stages: how many Dadda heights lie below HM.
  function automatic int nstages();
    int k = 0;
    while (dseq(k + 1) < int'(HM)) k++;
    return k;
  endfunction

  localparam int NST = nstages();
  localparam int FW  = 8;                    // bits per count in the plan
  localparam int PLAN_BITS = (NST + 1) * W * 3 * FW;

  // make_plan(): for every stage s (0..NST) and column c, three counts
  // packed FW bits each: [0] bits of column c entering stage s (s = NST gives
  // the final two-row heights), [1] full adders placed in column c in stage
  // s, [2] half adders. Dadda rule: a column is reduced only as far as the
  // stage target, counting the carries that arrive from the column below.
  function automatic logic [PLAN_BITS-1:0] make_plan();
    logic [PLAN_BITS-1:0] t;  // every field is written below
    int h  [W];
    int fa [W];
    int ha [W];
    int d, cin, e;
    for (int k = 0; k < int'(W); k++)
      h[k] = ((k < int'(N)) ? k + 1 : int'(W) - 1 - k) + int'(ACC_ROW);
    for (int st = 0; st <= NST; st++) begin
      for (int k = 0; k < int'(W); k++) begin
        fa[k] = 0;
        ha[k] = 0;
      end
      if (st < NST) begin
        d   = dseq(NST - st);
        cin = 0;
        for (int k = 0; k < int'(W); k++) begin
          e = h[k] + cin - d;
          if (e > 0) begin
            fa[k] = e / 2;
            ha[k] = e % 2;
          end
          cin = fa[k] + ha[k];
        end
      end
      for (int k = 0; k < int'(W); k++) begin
        t[((st * W + k) * 3 + 0) * FW +: FW] = FW'(h[k]);
        t[((st * W + k) * 3 + 1) * FW +: FW] = FW'(fa[k]);
        t[((st * W + k) * 3 + 2) * FW +: FW] = FW'(ha[k]);
      end
      for (int k = int'(W) - 1; k >= 0; k--)
        h[k] = h[k] - 2 * fa[k] - ha[k] + ((k > 0) ? fa[k-1] + ha[k-1] : 0);
    end
    return t;
  endfunction

  localparam logic [PLAN_BITS-1:0] PLAN = make_plan();

  // plan(s, c, what): one count from PLAN; 0 for a column outside 0..W-1.
  function automatic int plan(int s, int c, int what);
    if (c < 0 || c >= int'(W)) return 0;
    return int'(PLAN[((s * W + c) * 3 + what) * FW +: FW]);
  endfunction

  // ---- step 1: partial products in triangular form ----------------------
  // pp[c] holds the bits of column c in its low positions, the rest zero.
  logic [HM-1:0] pp [W];

  for (genvar c = 0; c < W; c++) begin : g_pp
    localparam int LO = (c >= N) ? c - N + 1 : 0;     // lowest a index
    localparam int HI = (c < N) ? c : N - 1;          // highest a index
    localparam int NB = HI - LO + 1;                  // partial products
    for (genvar i = LO; i <= HI; i++) begin : g_bit
      assign pp[c][i-LO] = a[i] & b[c-i];
    end
    if (ACC_ROW) begin : g_addend
      assign pp[c][NB] = addend[c];
    end
    if (NB + int'(ACC_ROW) < HM) begin : g_zero
      assign pp[c][HM-1:NB+int'(ACC_ROW)] = '0;
    end
  end

  // ---- step 2: Dadda reduction stages ------------------------------------
  // In stage s, cur[c] are the bits entering column c, fac/hac[c] the
  // carries of the full/half adders of column c, nxt[c] the bits leaving it.
  for (genvar s = 0; s < NST; s++) begin : g_st
    logic [HM-1:0] cur [W];
    logic [HM-1:0] fac [W];
    logic [HM-1:0] hac [W];
    logic [HM-1:0] nxt [W];

    if (s == 0) begin : g_first
      assign cur = pp;
    end else begin : g_next
      assign cur = g_st[s-1].nxt;
    end

    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int H    = plan(s, c, 0);
      localparam int F    = plan(s, c, 1);
      localparam int A    = plan(s, c, 2);
      localparam int FP   = plan(s, c - 1, 1);
      localparam int AP   = plan(s, c - 1, 2);
      localparam int PASS = H - 3 * F - 2 * A;
      localparam int OUTH = PASS + F + A + FP + AP;

      if (PASS < 0 || OUTH != plan(s + 1, c, 0)) begin : g_bad
        $error("dadda_mult: inconsistent reduction plan");
      end

      // bits that go through this stage untouched
      for (genvar k = 0; k < PASS; k++) begin : g_pass
        assign nxt[c][k] = cur[c][3*F + 2*A + k];
      end
      // full adders
      for (genvar i = 0; i < F; i++) begin : g_fa
        assign {fac[c][i], nxt[c][PASS + i]} =
            cur[c][3*i] + cur[c][3*i+1] + cur[c][3*i+2];
      end
      // half adders
      for (genvar i = 0; i < A; i++) begin : g_ha
        assign {hac[c][i], nxt[c][PASS + F + i]} =
            cur[c][3*F + 2*i] + cur[c][3*F + 2*i + 1];
      end
      // carries arriving from the column below
      for (genvar i = 0; i < FP; i++) begin : g_fc
        assign nxt[c][PASS + F + A + i] = fac[c-1][i];
      end
      for (genvar i = 0; i < AP; i++) begin : g_hc
        assign nxt[c][PASS + F + A + FP + i] = hac[c-1][i];
      end
      if (OUTH < HM) begin : g_zero
        assign nxt[c][HM-1:OUTH] = '0;
      end
      if (F < HM) begin : g_fzero
        assign fac[c][HM-1:F] = '0;
      end
      if (A < HM) begin : g_hzero
        assign hac[c][HM-1:A] = '0;
      end
    end
  end

  // ---- step 3: final two rows added by the CLA ---------------------------
  logic [HM-1:0] last [W];
  logic [W-1:0] row0, row1;

  if (NST > 0) begin : g_last
    assign last = g_st[NST-1].nxt;
  end else begin : g_last_pp
    assign last = pp;
  end

  for (genvar c = 0; c < W; c++) begin : g_rows
    localparam int HF = plan(NST, c, 0);
    if (HF > 2) begin : g_bad
      $error("dadda_mult: more than two rows left");
    end
    assign row0[c] = (HF >= 1) ? last[c][0] : 1'b0;
    assign row1[c] = (HF >= 2) ? last[c][1] : 1'b0;
  end

  // The result is taken modulo 2**W: a bare product always fits, and with
  // the addend row the carry out is the wrap-around of the sum.
  logic final_cout;

  cla64bit #(.WIDTH(W)) u_final_cla (
    .cin  (1'b0),
    .a    (row0),
    .b    (row1),
    .s    (p),
    .cout (final_cout)
  );

endmodule : dadda_mult
