// Self-checking testbench for set2_group_eq: all 32 combinations of e_in and
// the four XNOR bits; e_out must be 1 only for e_in = 1 with all bits equal.
module tb_set2_group_eq;
  logic       e_in, e_out;
  logic [3:0] xn;
  int checks = 0, failures = 0;

  set2_group_eq #(.GROUP_W(4)) dut (.e_in(e_in), .xn(xn), .e_out(e_out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic exp;
      {e_in, xn} = v[4:0];
      exp = (v == 31);
      #1;
      checks++;
      if (e_out !== exp) begin
        failures++;
        $display("FAIL e_in=%b xn=%b e_out=%b", e_in, xn, e_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
