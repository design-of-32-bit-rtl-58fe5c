// tb_sm_multiplier: self-checking test of the sign-magnitude multiplier.
//
// Operands are 32-bit {sign, magnitude} words. The expected product is
// computed independently: each operand is converted to a signed integer
// (negated magnitude when the sign is set) and the two are multiplied as
// 64-bit signed values. Covers all four sign combinations, negative zero,
// the largest magnitudes and random words. Combinational.
module tb_sm_multiplier;

  int checks = 0;
  int failures = 0;

  logic [31:0] x, y;
  logic [63:0] p;

  sm_multiplier dut (.x(x), .y(y), .p(p));

  function automatic longint sm_value(logic [31:0] w);
    longint m = longint'(w[30:0]);
    return w[31] ? -m : m;
  endfunction

  task automatic check(input logic [31:0] tx, input logic [31:0] ty);
    longint exp;
    x = tx; y = ty;
    #1;
    exp = sm_value(tx) * sm_value(ty);
    checks++;
    if (p !== 64'(exp)) begin
      failures++;
      $display("FAIL sm_mult: %h * %h got %h exp %h", tx, ty, p, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'd8, 32'd8);
    check(32'h8000_0008, 32'd8);
    check(32'd8, 32'h8000_0008);
    check(32'h8000_0008, 32'h8000_0008);
    check(32'h8000_0000, 32'd5);          // negative zero
    check(32'h8000_0000, 32'h8000_0005);
    check(32'h7FFF_FFFF, 32'h7FFF_FFFF);
    check(32'hFFFF_FFFF, 32'h7FFF_FFFF);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    for (int i = 0; i < 20000; i++)
      check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_sm_multiplier
