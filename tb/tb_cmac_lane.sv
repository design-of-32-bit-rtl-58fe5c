// tb_cmac_lane: self-checking test of one complex MAC lane, in all modes.
//
// Four lanes share the operands: built to subtract (real part,
// acc += a0*b0 - a1*b1) or to add (imaginary part, acc += a0*b0 + a1*b1),
// each with a separate accumulator (FUSED = 0) and with the
// multiplier-cum-accumulator (FUSED = 1). Operands are random sign-magnitude words, with small magnitudes
// part of the time so that signs and cancellation matter. After every
// rising edge both accumulators are compared with a bench model that
// converts the operands to signed integers and accumulates modulo 2**64.
// Reset is pulsed now and then and must clear all lanes.
module tb_cmac_lane;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  logic        clock = 1'b0;
  logic        reset;
  logic [31:0] a0, b0, a1, b1;
  logic [63:0] acc_sub, acc_add, acc_fsub, acc_fadd;
  longint      m_sub, m_add;

  cmac_lane #(.SUBTRACT(1'b1)) dut_sub (
    .clock(clock), .reset(reset), .a0(a0), .b0(b0), .a1(a1), .b1(b1), .acc(acc_sub));
  cmac_lane #(.SUBTRACT(1'b0)) dut_add (
    .clock(clock), .reset(reset), .a0(a0), .b0(b0), .a1(a1), .b1(b1), .acc(acc_add));
  cmac_lane #(.SUBTRACT(1'b1), .FUSED(1'b1)) dut_fsub (
    .clock(clock), .reset(reset), .a0(a0), .b0(b0), .a1(a1), .b1(b1), .acc(acc_fsub));
  cmac_lane #(.SUBTRACT(1'b0), .FUSED(1'b1)) dut_fadd (
    .clock(clock), .reset(reset), .a0(a0), .b0(b0), .a1(a1), .b1(b1), .acc(acc_fadd));

  always #5 clock = ~clock;
  always @(posedge clock) cycles++;

  initial begin
    wait (cycles == 100_000);
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
    if ($urandom % 2) w[30:0] = 31'($urandom % 100);
    return w;
  endfunction

  initial begin
    reset = 1'b1; a0 = '0; b0 = '0; a1 = '0; b1 = '0;
    m_sub = 0; m_add = 0;
    @(posedge clock); #1;
    for (int i = 0; i < 3000; i++) begin
      reset = (($urandom % 64) == 0);
      a0 = rand_word(); b0 = rand_word(); a1 = rand_word(); b1 = rand_word();
      @(posedge clock);
      if (reset) begin
        m_sub = 0; m_add = 0;
      end else begin
        m_sub = m_sub + sm_value(a0) * sm_value(b0) - sm_value(a1) * sm_value(b1);
        m_add = m_add + sm_value(a0) * sm_value(b0) + sm_value(a1) * sm_value(b1);
      end
      #1;
      checks += 4;
      if (acc_fsub !== 64'(m_sub)) begin
        failures++;
        $display("FAIL fused sub lane cycle %0d: got %h exp %h", i, acc_fsub, m_sub);
      end
      if (acc_fadd !== 64'(m_add)) begin
        failures++;
        $display("FAIL fused add lane cycle %0d: got %h exp %h", i, acc_fadd, m_add);
      end
      if (acc_sub !== 64'(m_sub)) begin
        failures++;
        $display("FAIL sub lane cycle %0d: got %h exp %h", i, acc_sub, m_sub);
      end
      if (acc_add !== 64'(m_add)) begin
        failures++;
        $display("FAIL add lane cycle %0d: got %h exp %h", i, acc_add, m_add);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule : tb_cmac_lane
