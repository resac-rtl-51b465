// Testbench of resac_unit: random operands and corner cases, with the
// MSP and HOLSP outputs compared against the reference model, including
// the carry that the HOLSP hands to the MSP.
module tb_resac_unit;
  import resac_pkg::*;
  import resac_ref_pkg::*;
  logic [ADDER_W-1:0] a, b;
  logic [MSP_W:0]     p;
  logic [HOLSP_W-1:0] q;
  int checks = 0, failures = 0, carries = 0;

  resac_unit dut (.a(a[ADDER_W-1:LOLSP_W]), .b(b[ADDER_W-1:LOLSP_W]), .p(p), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [MSP_W:0]     ep;
    logic [HOLSP_W-1:0] eq;
    #1;
    ep = msp_ref(a, b);
    eq = holsp_ref(a[LSP_W-1 -: HOLSP_W], b[LSP_W-1 -: HOLSP_W]);
    if (a[LSP_W-1] && b[LSP_W-1]) carries++;
    checks++;
    if (p != ep || q != eq) begin
      failures++;
      $display("FAIL a=%h b=%h p=%h q=%h expected %h %h", a, b, p, q, ep, eq);
    end
  endtask

  initial begin
    a = '1; b = '1; check();
    a = 32'hFFFF_FE00; b = 32'h0000_0200; check();   // carry from HOLSP ripples to overflow
    a = '0; b = '0; check();
    for (int n = 0; n < 2000; n++) begin
      a = $urandom; b = $urandom; check();
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL no carry from the HOLSP into the MSP was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
