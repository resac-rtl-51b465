// Testbench of majority_voter: exhaustive over all 8 input combinations
// per bit position (one bit position at a time, others random), plus
// random buses checked bit by bit against a count of ones.
module tb_majority_voter;
  localparam int unsigned W = 23;
  logic [W-1:0] x, y, z, v;
  int checks = 0, failures = 0;

  majority_voter #(.WIDTH(W)) dut (.x(x), .y(y), .z(z), .v(v));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_bus();
    for (int i = 0; i < int'(W); i++) begin
      int ones;
      ones = int'(x[i]) + int'(y[i]) + int'(z[i]);
      checks++;
      if (v[i] != (ones >= 2)) begin
        failures++;
        $display("FAIL bit %0d x=%b y=%b z=%b v=%b", i, x[i], y[i], z[i], v[i]);
      end
    end
  endtask

  initial begin
    for (int pos = 0; pos < int'(W); pos++) begin
      for (int c = 0; c < 8; c++) begin
        x = W'($urandom); y = W'($urandom); z = W'($urandom);
        x[pos] = c[0]; y[pos] = c[1]; z[pos] = c[2];
        #1 check_bus();
      end
    end
    for (int n = 0; n < 200; n++) begin
      x = W'($urandom); y = W'($urandom); z = W'($urandom);
      #1 check_bus();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
