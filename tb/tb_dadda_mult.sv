// tb_dadda_mult: self-checking test of the Dadda tree multiplier.
//
// The default 32 x 32 instance gets corner cases (zero, one, all ones,
// single bits, alternating patterns) and random operands, sometimes with
// sparse bit patterns; the 64-bit product is compared with the simulator's
// own multiplication. A 5 x 5 instance is checked exhaustively, so every
// column of a complete (smaller) reduction tree is exercised with every
// input. The fused form (ACC_ROW = 1, p = a*b + addend mod 2**2N) is checked
// the same way: a 32 x 32 instance with random addends and a 5 x 5 instance
// over all operand pairs with several addends each. Combinational; values
// are sampled 1 ns after being applied.
module tb_dadda_mult;

  int checks = 0;
  int failures = 0;

  logic [31:0] a, b;
  logic [63:0] p;

  dadda_mult dut (.a(a), .b(b), .addend('0), .p(p));

  logic [63:0] c32, q32;

  dadda_mult #(.N(32), .ACC_ROW(1'b1)) dut_acc (.a(a), .b(b), .addend(c32), .p(q32));

  logic [4:0] a5, b5;
  logic [9:0] p5;

  dadda_mult #(.N(5)) dut5 (.a(a5), .b(b5), .addend('0), .p(p5));

  logic [9:0] c5, q5;

  dadda_mult #(.N(5), .ACC_ROW(1'b1)) dut5_acc (.a(a5), .b(b5), .addend(c5), .p(q5));

  task automatic check32(input logic [31:0] ta, input logic [31:0] tb_);
    logic [63:0] exp;
    logic [63:0] tc = {$urandom, $urandom};
    a = ta; b = tb_; c32 = tc;
    #1;
    exp = 64'(ta) * 64'(tb_);
    checks += 2;
    if (p !== exp) begin
      failures++;
      $display("FAIL dadda32: %h * %h got %h exp %h", ta, tb_, p, exp);
    end
    if (q32 !== exp + tc) begin
      failures++;
      $display("FAIL dadda32+acc: %h * %h + %h got %h exp %h", ta, tb_, tc, q32, exp + tc);
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
    check32(0, 0);
    check32(1, 1);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check32(32'hFFFF_FFFF, 1);
    check32(32'h8000_0000, 32'h8000_0000);
    check32(32'hAAAA_AAAA, 32'h5555_5555);
    check32(8, 8);
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j += 3)
        check32(32'(1) << i, ~(32'(1) << j));
    for (int i = 0; i < 20000; i++)
      check32($urandom, $urandom);
    for (int i = 0; i < 5000; i++)
      check32($urandom & $urandom & $urandom, $urandom | $urandom);

    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j);
        for (int k = 0; k < 8; k++) begin
          c5 = (k == 0) ? 10'h3FF : (k == 1) ? 10'h0 : 10'($urandom);
          #1;
          checks += 2;
          if (p5 !== 10'(i * j)) begin
            failures++;
            $display("FAIL dadda5: %0d * %0d got %0d", i, j, p5);
          end
          if (q5 !== 10'(i * j + int'(c5))) begin
            failures++;
            $display("FAIL dadda5+acc: %0d * %0d + %0d got %0d", i, j, c5, q5);
          end
        end
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_dadda_mult
