// tb_cla64bit: self-checking test of the 64-bit carry look-ahead adder.
//
// Applies directed corner cases (carry rippling through all 64 bits, carry
// out, all ones) and random operands with random carry in, and compares
// {cout, s} with the 65-bit sum a + b + cin computed by the simulator. A
// 6-bit instance is checked exhaustively to cover the padded (non power of
// four) width of the lookahead tree. Combinational: values are sampled 1 ns
// after they are applied; a watchdog ends the run if it stalls.
module tb_cla64bit;

  int checks = 0;
  int failures = 0;

  logic        cin;
  logic [63:0] a, b, s;
  logic        cout;

  cla64bit dut (.cin(cin), .a(a), .b(b), .s(s), .cout(cout));

  logic       cin6;
  logic [5:0] a6, b6, s6;
  logic       cout6;

  cla64bit #(.WIDTH(6)) dut6 (.cin(cin6), .a(a6), .b(b6), .s(s6), .cout(cout6));

  task automatic check64(input logic [63:0] ta, input logic [63:0] tb_, input logic tc);
    logic [64:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + 65'(tc);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL cla64: a=%h b=%h cin=%0d got %0d_%h exp %h", ta, tb_, tc, cout, s, exp);
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
    check64(64'hFFFF_FFFF_FFFF_FFFF, 64'h0, 1'b1);
    check64(64'hFFFF_FFFF_FFFF_FFFF, 64'h1, 1'b0);
    check64(64'hFFFF_FFFF_FFFF_FFFF, 64'hFFFF_FFFF_FFFF_FFFF, 1'b1);
    check64(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    check64(64'h0, 64'h0, 1'b0);
    check64(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA, 1'b1);
    check64(64'h0000_0000_FFFF_FFFF, 64'h0000_0000_0000_0001, 1'b0);
    for (int i = 0; i < 64; i++) check64(64'(1) << i, ~64'(0) >> (63 - i), 1'b0);
    for (int i = 0; i < 20000; i++)
      check64({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));

    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++)
        for (int c = 0; c < 2; c++) begin
          a6 = 6'(i); b6 = 6'(j); cin6 = 1'(c);
          #1;
          checks++;
          if ({cout6, s6} !== 7'(i + j + c)) begin
            failures++;
            $display("FAIL cla6: %0d + %0d + %0d got %0d", i, j, c, {cout6, s6});
          end
        end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_cla64bit
