// Testbench of holsp: all 256 combinations of the four operand bit pairs,
// compared with the behavioural rules of the approximate part, and the
// MSP carry compared with the AND of the top bits. Also counts how often
// the saturating correction fired.
module tb_holsp;
  import resac_ref_pkg::*;
  logic [3:0] a, b, q;
  logic       cmsp;
  int checks = 0, failures = 0, saturations = 0;

  holsp dut (.a(a), .b(b), .q(q), .cmsp(cmsp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      checks++;
      if (q != holsp_ref(a, b)) begin
        failures++;
        $display("FAIL a=%b b=%b q=%b expected %b", a, b, q, holsp_ref(a, b));
      end
      checks++;
      if (cmsp != (a[3] & b[3])) begin
        failures++;
        $display("FAIL carry a=%b b=%b cmsp=%b", a, b, cmsp);
      end
      if ((a[3] ^ b[3]) && a[2] && b[2]) saturations++;
    end
    checks++;
    if (saturations != 32) begin
      failures++;
      $display("FAIL saturation case seen %0d times", saturations);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
