// Self-checking testbench for cem at N = 64. For random operands, operands
// that differ in exactly one chosen bit, and equal operands, it expects
// aeb = (A == B) and exactly one g bit, in the group of the most significant
// differing bit, when A > B, computed here with plain integer comparison.
module tb_cem;
  localparam int N  = 64;
  localparam int NG = N / 4;
  logic [N-1:0]  a, b;
  logic [NG-1:0] g;
  logic          aeb;
  int checks = 0, failures = 0;

  cem #(.N(N), .GROUP_W(4)) dut (.a(a), .b(b), .g(g), .aeb(aeb));

  task automatic check();
    logic [NG-1:0] e_g;
    e_g = '0;
    if (a > b) begin
      for (int i = N - 1; i >= 0; i--)
        if (a[i] != b[i]) begin
          e_g[i / 4] = 1'b1;
          break;
        end
    end
    #1;
    checks++;
    if (aeb !== (a == b) || g !== e_g) begin
      failures++;
      $display("FAIL a=%h b=%h g=%h exp=%h aeb=%b", a, b, g, e_g, aeb);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      check();
    end
    for (int i = 0; i < N; i++) begin
      a = {$urandom, $urandom};
      b = a;
      b[i] = ~b[i];
      check();
      b = a;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
