// tb_mac: end-to-end test of the 32-bit complex multiply-accumulate unit.
//
// Runs the unit at its default size. First the published example: after
// reset, with a = x = 8 and b = y = 2, one clock edge must give
// realp = 8*8 - 2*2 = 60 and imgp = 8*2 + 2*8 = 32; a second edge doubles
// both. Then random complex operands (sign-magnitude, mixing full-range and
// small magnitudes, negative zero included) are applied for many cycles,
// with occasional resets, and after every edge realp/imgp are compared with
// a bench model that accumulates (P*R - Q*S) and (P*S + Q*R) modulo 2**64.
// It also checks that the outputs do not change before the edge (one-edge
// latency). The mechanisms of the design are counted and each must occur:
// accumulation onto a non-zero value, a negative operand (sign handling),
// a negative zero operand, a negative real term (subtraction), a reset in
// the middle of accumulation, and a wrap of an accumulator past 2**63.
module tb_mac;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  logic        clock = 1'b0;
  logic        reset;
  logic [31:0] a, b, x, y;
  logic [63:0] realp, imgp;
  longint      m_re, m_im;

  // mechanism counters
  int n_accum = 0, n_neg_operand = 0, n_neg_zero = 0;
  int n_neg_real_term = 0, n_mid_reset = 0, n_wrap = 0;

  mac dut (
    .a(a), .b(b), .x(x), .y(y),
    .clock(clock), .reset(reset),
    .imgp(imgp), .realp(realp)
  );

  always #5 clock = ~clock;
  always @(posedge clock) cycles++;

  initial begin
    wait (cycles == 200_000);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sm_value(logic [31:0] w);
    longint m = longint'(w[30:0]);
    return w[31] ? -m : m;
  endfunction

  function automatic logic [31:0] rand_word();
    logic [31:0] w = $urandom;
    case ($urandom % 4)
      0: w[30:0] = 31'($urandom % 16);
      1: w[30:0] = 31'h7FFF_FFFF - 31'($urandom % 4);
      default: ;
    endcase
    return w;
  endfunction

  task automatic expect_out(input longint re, input longint im, input string what);
    checks += 2;
    if (realp !== 64'(re)) begin
      failures++;
      $display("FAIL %s: realp got %h exp %h", what, realp, re);
    end
    if (imgp !== 64'(im)) begin
      failures++;
      $display("FAIL %s: imgp got %h exp %h", what, imgp, im);
    end
  endtask

  // one clock with the given inputs, model update and check
  task automatic step(input logic r, input logic [31:0] ta, input logic [31:0] tb_,
                      input logic [31:0] tx, input logic [31:0] ty);
    longint p, q, rr, s, t_re, t_im, n_re, n_im;
    reset = r; a = ta; b = tb_; x = tx; y = ty;
    #2;
    expect_out(m_re, m_im, "before edge");
    p = sm_value(ta); q = sm_value(tb_); rr = sm_value(tx); s = sm_value(ty);
    t_re = p * rr - q * s;
    t_im = p * s + q * rr;
    if (r) begin
      if (m_re != 0 || m_im != 0) n_mid_reset++;
      n_re = 0; n_im = 0;
    end else begin
      if (m_re != 0 || m_im != 0) n_accum++;
      if (ta[31] | tb_[31] | tx[31] | ty[31]) n_neg_operand++;
      if ((ta[31] && ta[30:0] == 0) || (tb_[31] && tb_[30:0] == 0) ||
          (tx[31] && tx[30:0] == 0) || (ty[31] && ty[30:0] == 0)) n_neg_zero++;
      if (t_re < 0) n_neg_real_term++;
      n_re = m_re + t_re;
      n_im = m_im + t_im;
      if ((m_re[63] == t_re[63] && n_re[63] != m_re[63]) ||
          (m_im[63] == t_im[63] && n_im[63] != m_im[63])) n_wrap++;
    end
    @(posedge clock);
    m_re = n_re; m_im = n_im;
    #1;
    expect_out(m_re, m_im, "after edge");
  endtask

  initial begin
    m_re = 0; m_im = 0;
    reset = 1'b1; a = '0; b = '0; x = '0; y = '0;
    @(posedge clock); @(posedge clock); #1;
    expect_out(0, 0, "reset");

    // published example: (8 + j2)(8 + j2) = 60 + j32
    step(1'b0, 32'd8, 32'd2, 32'd8, 32'd2);
    checks++;
    if (realp !== 64'd60 || imgp !== 64'd32) begin
      failures++;
      $display("FAIL example: realp=%0d imgp=%0d", realp, imgp);
    end
    step(1'b0, 32'd8, 32'd2, 32'd8, 32'd2);
    expect_out(120, 64, "example accumulated twice");

    // negative zero operands
    step(1'b0, 32'h8000_0000, 32'd3, 32'd5, 32'h8000_0000);

    // random operation with occasional resets
    for (int i = 0; i < 5000; i++)
      step(($urandom % 100) == 0, rand_word(), rand_word(), rand_word(), rand_word());

    // drive an accumulator past 2**63: largest positive real terms
    for (int i = 0; i < 4; i++)
      step(1'b0, 32'h7FFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0);

    $display("mechanisms: accumulate=%0d negative_operand=%0d negative_zero=%0d",
             n_accum, n_neg_operand, n_neg_zero);
    $display("            negative_real_term=%0d mid_reset=%0d wrap=%0d",
             n_neg_real_term, n_mid_reset, n_wrap);
    checks += 6;
    if (n_accum == 0)         begin failures++; $display("FAIL no accumulation seen"); end
    if (n_neg_operand == 0)   begin failures++; $display("FAIL no negative operand"); end
    if (n_neg_zero == 0)      begin failures++; $display("FAIL no negative zero"); end
    if (n_neg_real_term == 0) begin failures++; $display("FAIL no negative real term"); end
    if (n_mid_reset == 0)     begin failures++; $display("FAIL no reset during accumulation"); end
    if (n_wrap == 0)          begin failures++; $display("FAIL no accumulator wrap"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_mac
