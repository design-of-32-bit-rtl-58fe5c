// tb_sm_mac: self-checking test of the multiplier-cum-accumulator.
//
// Checks r = acc + x*y, with x and y 32-bit sign-magnitude words and acc a
// 64-bit two's complement value. The expected value is computed by the bench
// from signed integers, modulo 2**64. Covers every sign combination, negative
// zero, negative and positive accumulator values, values that make the sum
// wrap, and random words. Combinational.
module tb_sm_mac;

  int checks = 0;
  int failures = 0;

  logic [31:0] x, y;
  logic [63:0] acc, r;

  sm_mac dut (.x(x), .y(y), .acc(acc), .r(r));

  function automatic longint sm_value(logic [31:0] w);
    longint m = longint'(w[30:0]);
    return w[31] ? -m : m;
  endfunction

  task automatic check(input logic [31:0] tx, input logic [31:0] ty, input logic [63:0] ta);
    longint exp;
    x = tx; y = ty; acc = ta;
    #1;
    exp = longint'(ta) + sm_value(tx) * sm_value(ty);
    checks++;
    if (r !== 64'(exp)) begin
      failures++;
      $display("FAIL sm_mac: %h * %h + %h got %h exp %h", tx, ty, ta, r, exp);
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
    check(32'd8, 32'd8, 64'd0);
    check(32'd8, 32'd8, -64'd4);
    check(32'h8000_0002, 32'd2, 64'd64);     // 64 - 4
    check(32'h8000_0002, 32'h8000_0002, 64'd0);
    check(32'h8000_0000, 32'h8000_0005, 64'd7); // negative zero
    check(32'h8000_0000, 32'd5, -64'd7);
    check(32'hFFFF_FFFF, 32'h7FFF_FFFF, 64'd0);
    check(32'h7FFF_FFFF, 32'h7FFF_FFFF, 64'h7FFF_FFFF_FFFF_FFFF);  // wraps
    check(32'hFFFF_FFFF, 32'h7FFF_FFFF, 64'h8000_0000_0000_0000);  // wraps
    for (int i = 0; i < 20000; i++)
      check($urandom, $urandom, {$urandom, $urandom});
    for (int i = 0; i < 5000; i++)
      check($urandom, $urandom, 64'(longint'($signed($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_sm_mac
