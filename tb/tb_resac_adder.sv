// End-to-end testbench of the RESAC adder at its default (32-bit) size.
//
// 1. Fault-free: over a thousand random operand pairs, one every 2 ns,
//    plus corner cases, compared with the reference model; the error
//    against exact addition is also tracked and must stay below 2^K.
// 2. Upsets in one functional unit: the MSP result or the HOLSP result of
//    unit A, B or C is overwritten with random bit flips; the voted
//    output must not change (masked by voter 1 or voter 2).
// 3. The same bit flipped in two units' MSP results: the voter must pass
//    the wrong value (a single-fault-tolerant scheme, by construction).
// 4. Worst-case LOLSP upsets: every LOLSP bit flipped; the upper bits of
//    the sum must be unchanged and the error stays below 2^K.
// Each mechanism is counted, and one that never happened is a failure.
module tb_resac_adder;
  timeunit 1ns;
  timeprecision 1ps;
  import resac_pkg::*;
  import resac_ref_pkg::*;

  logic [ADDER_W-1:0] a, b;
  logic [ADDER_W:0]   sum;
  logic [MSP_W:0]     m1;
  logic [HOLSP_W-1:0] m2;
  logic [LOLSP_W-1:0] r;

  int checks = 0, failures = 0;
  int n_carry = 0, n_saturate = 0, n_msp_mask = 0, n_holsp_mask = 0;
  int n_double = 0, n_lolsp_upset = 0, n_overflow = 0;
  longint max_err = 0;

  resac_adder dut (.a(a), .b(b), .sum(sum), .m1(m1), .m2(m2), .r(r));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint abs_err(input logic [ADDER_W:0] s);
    longint exact, got;
    exact = longint'(a) + longint'(b);
    got   = longint'(s);
    return (got > exact) ? got - exact : exact - got;
  endfunction

  task automatic expect_sum(input logic [ADDER_W:0] e, input string what);
    checks++;
    if (sum != e) begin
      failures++;
      $display("FAIL %s a=%h b=%h sum=%h expected %h", what, a, b, sum, e);
    end
  endtask

  task automatic fault_free();
    longint e;
    #2;
    expect_sum(resac_ref(a, b), "fault-free");
    e = abs_err(sum);
    if (e > max_err) max_err = e;
    checks++;
    if (e >= (longint'(1) << LSP_W)) begin
      failures++;
      $display("FAIL error %0d not below 2^K for a=%h b=%h", e, a, b);
    end
    if (a[LSP_W-1] && b[LSP_W-1]) n_carry++;
    if ((a[LSP_W-1] ^ b[LSP_W-1]) && a[LSP_W-2] && b[LSP_W-2]) n_saturate++;
    if (sum[ADDER_W]) n_overflow++;
  endtask

  // Random upset of one unit's MSP result; unit chosen by u.
  task automatic msp_upset(input int u);
    logic [MSP_W:0] flip, good;
    logic [ADDER_W:0] e;
    #1;
    e    = resac_ref(a, b);
    good = dut.p_a;
    flip = (MSP_W + 1)'({$urandom, $urandom}) | (MSP_W + 1)'(1 << ($urandom % (MSP_W + 1)));
    case (u)
      0: force dut.p_a = good ^ flip;
      1: force dut.p_b = good ^ flip;
      default: force dut.p_c = good ^ flip;
    endcase
    #2;
    expect_sum(e, "MSP upset");
    n_msp_mask++;
    release dut.p_a; release dut.p_b; release dut.p_c;
  endtask

  task automatic holsp_upset(input int u);
    logic [HOLSP_W-1:0] flip, good;
    logic [ADDER_W:0] e;
    #1;
    e    = resac_ref(a, b);
    good = dut.q_a;
    flip = HOLSP_W'($urandom) | HOLSP_W'(1 << ($urandom % HOLSP_W));
    case (u)
      0: force dut.q_a = good ^ flip;
      1: force dut.q_b = good ^ flip;
      default: force dut.q_c = good ^ flip;
    endcase
    #2;
    expect_sum(e, "HOLSP upset");
    n_holsp_mask++;
    release dut.q_a; release dut.q_b; release dut.q_c;
  endtask

  task automatic double_upset();
    logic [MSP_W:0] flip, good;
    #1;
    good = dut.p_a;
    flip = (MSP_W + 1)'(1 << ($urandom % (MSP_W + 1)));
    force dut.p_a = good ^ flip;
    force dut.p_b = good ^ flip;
    #2;
    checks++;
    if (m1 != (good ^ flip)) begin
      failures++;
      $display("FAIL two-unit upset not passed by voter: m1=%h", m1);
    end
    n_double++;
    release dut.p_a; release dut.p_b;
  endtask

  task automatic lolsp_upset();
    logic [ADDER_W:0] e;
    longint err;
    #1;
    e = resac_ref(a, b);
    force dut.r = ~e[LOLSP_W-1:0];
    #2;
    checks++;
    if (sum[ADDER_W:LOLSP_W] != e[ADDER_W:LOLSP_W] || sum[LOLSP_W-1:0] != '0) begin
      failures++;
      $display("FAIL LOLSP upset reached upper bits: sum=%h", sum);
    end
    err = abs_err(sum);
    checks++;
    if (err >= (longint'(1) << LSP_W)) begin
      failures++;
      $display("FAIL LOLSP upset error %0d", err);
    end
    n_lolsp_upset++;
    release dut.r;
  endtask

  initial begin
    // Corner cases.
    a = '0; b = '0; fault_free();
    a = '1; b = '1; fault_free();
    a = 32'hFFFF_FE00; b = 32'h0000_0200; fault_free();
    a = 32'h0000_0300; b = 32'h0000_0100; fault_free();   // saturation
    a = 32'h8000_0000; b = 32'h8000_0000; fault_free();   // overflow
    // Section-5 style random stimulus.
    for (int n = 0; n < 1200; n++) begin
      a = $urandom; b = $urandom; fault_free();
    end
    // Small operands, where the approximate low part matters most.
    for (int n = 0; n < 300; n++) begin
      a = $urandom % 4096; b = $urandom % 4096; fault_free();
    end
    // Fault injection.
    for (int n = 0; n < 300; n++) begin
      a = $urandom; b = $urandom;
      msp_upset(n % 3);
      holsp_upset(n % 3);
      lolsp_upset();
      if (n % 10 == 0) double_upset();
    end
    $display("mechanisms: carry=%0d saturate=%0d overflow=%0d msp_masked=%0d holsp_masked=%0d double=%0d lolsp_upset=%0d max_err=%0d",
             n_carry, n_saturate, n_overflow, n_msp_mask, n_holsp_mask, n_double, n_lolsp_upset, max_err);
    checks++; if (n_carry == 0)       begin failures++; $display("FAIL no HOLSP carry"); end
    checks++; if (n_saturate == 0)    begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_overflow == 0)    begin failures++; $display("FAIL no overflow"); end
    checks++; if (n_msp_mask == 0)    begin failures++; $display("FAIL no MSP upset"); end
    checks++; if (n_holsp_mask == 0)  begin failures++; $display("FAIL no HOLSP upset"); end
    checks++; if (n_double == 0)      begin failures++; $display("FAIL no double upset"); end
    checks++; if (n_lolsp_upset == 0) begin failures++; $display("FAIL no LOLSP upset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
