// Self-checking testbench for set4_group_gt: all 16 flag patterns; g must be
// 1 whenever at least one active-low flag is 0.
module tb_set4_group_gt;
  logic [3:0] c_n;
  logic       g;
  int checks = 0, failures = 0;

  set4_group_gt #(.GROUP_W(4)) dut (.c_n(c_n), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      c_n = v[3:0];
      #1;
      checks++;
      if (g !== (v != 15)) begin
        failures++;
        $display("FAIL c_n=%b g=%b", c_n, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
