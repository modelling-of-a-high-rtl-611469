// Self-checking testbench for cem_group: every nibble pair A, B with e_in 0
// and 1. e_out must equal e_in AND (A == B); g must equal e_in AND (A > B).
module tb_cem_group;
  logic [3:0] a, b;
  logic       e_in, e_out, g;
  int checks = 0, failures = 0;

  cem_group #(.GROUP_W(4)) dut (.a(a), .b(b), .e_in(e_in), .e_out(e_out), .g(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int va = 0; va < 16; va++)
        for (int vb = 0; vb < 16; vb++) begin
          e_in = e[0];
          a    = va[3:0];
          b    = vb[3:0];
          #1;
          checks++;
          if (e_out !== (e == 1 && va == vb) || g !== (e == 1 && va > vb)) begin
            failures++;
            $display("FAIL e=%0d a=%h b=%h e_out=%b g=%b", e, a, b, e_out, g);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
