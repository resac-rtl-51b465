// Testbench of cla_block: exhaustive check of the 4-bit slice and of the
// 2-bit slice (both widths are used in the MSP) against integer addition.
module tb_cla_block;
  logic [3:0] a4, b4, s4;
  logic [1:0] a2, b2, s2;
  logic       cin, co4, co2;
  int checks = 0, failures = 0;

  cla_block #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(cin), .sum(s4), .cout(co4));
  cla_block #(.WIDTH(2)) dut2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(co2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int exp4, exp2;
      {cin, a4, b4} = 9'(v);
      a2 = a4[1:0]; b2 = b4[1:0];
      exp4 = int'(a4) + int'(b4) + int'(cin);
      exp2 = int'(a2) + int'(b2) + int'(cin);
      #1;
      checks++;
      if ({co4, s4} != 5'(exp4)) begin
        failures++;
        $display("FAIL 4-bit %0d+%0d+%0d -> %0d", a4, b4, cin, {co4, s4});
      end
      checks++;
      if ({co2, s2} != 3'(exp2)) begin
        failures++;
        $display("FAIL 2-bit %0d+%0d+%0d -> %0d", a2, b2, cin, {co2, s2});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
