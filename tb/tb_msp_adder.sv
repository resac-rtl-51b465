// Testbench of msp_adder at its default 22-bit size: random operands and
// carry inputs, plus carry-chain corner cases (all ones plus carry in,
// carry generated in the narrow slice and propagated to the top),
// compared with integer addition.
module tb_msp_adder;
  localparam int unsigned W = resac_pkg::MSP_W;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  msp_adder dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W:0] expect_s;
    #1;
    expect_s = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
    checks++;
    if ({cout, s} != expect_s) begin
      failures++;
      $display("FAIL %h + %h + %b -> %h, expected %h", a, b, cin, {cout, s}, expect_s);
    end
  endtask

  initial begin
    a = '1; b = '0; cin = 1'b1; check();
    a = '1; b = '1; cin = 1'b1; check();
    a = '0; b = '0; cin = 1'b0; check();
    a = W'(3); b = W'(1); cin = 1'b0; check();          // generated in narrow slice
    a = {{(W-2){1'b1}}, 2'b00}; b = W'(2); cin = 1'b1; check();
    for (int i = 0; i < int'(W); i++) begin              // single-bit carry paths
      a = '1; b = '0; b[i] = 1'b1; cin = 1'b0; check();
    end
    for (int n = 0; n < 2000; n++) begin
      a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
