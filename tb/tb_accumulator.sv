// tb_accumulator: self-checking test of the 64-bit accumulate register.
//
// Drives random terms (including large positive and negative ones, so the
// value wraps past 2**63 and 2**64) for many clocks and compares q after
// every rising edge with a reference sum kept modulo 2**64 by the bench.
// Also checks that reset clears q, that q holds its value while reset is
// asserted, and that a term appears in q exactly one edge after it is
// applied.
module tb_accumulator;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  logic        clock = 1'b0;
  logic        reset;
  logic [63:0] d, q;
  logic [63:0] model;

  accumulator dut (.clock(clock), .reset(reset), .d(d), .q(q));

  always #5 clock = ~clock;
  always @(posedge clock) cycles++;

  initial begin
    wait (cycles == 100_000);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic r, input logic [63:0] td);
    reset = r; d = td;
    @(posedge clock);
    model = r ? 64'h0 : model + td;
    #1;
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL acc: r=%0d d=%h got %h exp %h", r, td, q, model);
    end
  endtask

  initial begin
    model = '0;
    reset = 1'b1; d = 64'h1234;
    @(posedge clock); @(posedge clock); #1;
    checks++;
    if (q !== 64'h0) begin failures++; $display("FAIL reset does not clear"); end

    // latency: q must still be 0 before the first accumulating edge
    reset = 1'b0; d = 64'd60;
    #2;
    checks++;
    if (q !== 64'h0) begin failures++; $display("FAIL q changed before edge"); end
    @(posedge clock); #1;
    model = 64'd60;
    checks++;
    if (q !== 64'd60) begin failures++; $display("FAIL first term: %h", q); end

    for (int i = 0; i < 2000; i++) begin
      case ($urandom % 4)
        0: step(1'b0, 64'(-$signed({1'b0, $urandom})));
        1: step(1'b0, {$urandom, $urandom});
        2: step(1'b0, 64'h7FFF_FFFF_FFFF_FFFF);
        default: step(($urandom % 50) == 0, 64'($urandom));
      endcase
    end
    // reset held for several edges
    step(1'b1, 64'hDEAD);
    step(1'b1, 64'hBEEF);
    step(1'b0, 64'hFFFF_FFFF_FFFF_FFFF);
    step(1'b0, 64'h1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_accumulator
