// Self-checking testbench for set1_xor_xnor: applies all four input pairs
// and compares both outputs with a truth table written out by hand.
module tb_set1_xor_xnor;
  logic a, b, x, xn;
  int checks = 0, failures = 0;

  set1_xor_xnor dut (.a(a), .b(b), .x(x), .xn(xn));

  // Expected {x, xn} for {a, b} = 00, 01, 10, 11.
  localparam logic [1:0] EXP [4] = '{2'b01, 2'b10, 2'b10, 2'b01};

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      #1;
      checks++;
      if ({x, xn} !== EXP[v]) begin
        failures++;
        $display("FAIL a=%b b=%b x=%b xn=%b", a, b, x, xn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
