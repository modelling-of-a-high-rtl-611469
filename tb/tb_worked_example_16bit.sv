// Worked example at N = 16: A = 1010101010101010, B = 1001100110011001.
// Besides the outputs (A>B) it checks the intermediate words of every set
// against hand-derived values: XNOR 1100110011001100, XOR
// 0011001100110011, E3..E0 = 1000, A=B = 0, set-3 flags 1101111111111111,
// set-4 group results G3..G0 = 1000. It then checks random 16-bit operand
// pairs (and the swapped example) against integer comparison.
module tb_worked_example_16bit;
  import mc_pkg::*;

  localparam int N = 16;
  logic [N-1:0] a, b;
  cmp_result_t  res;
  int checks = 0, failures = 0;

  magnitude_comparator #(.N(N)) dut (.a(a), .b(b), .res(res));

  function automatic logic [N-1:0] get_word(input int which);
    logic [N-1:0] w;
    w = '0;
    case (which)
      0: begin
        w[3:0] = dut.u_cem.g_grp[0].u_grp.xn; w[7:4] = dut.u_cem.g_grp[1].u_grp.xn;
        w[11:8] = dut.u_cem.g_grp[2].u_grp.xn; w[15:12] = dut.u_cem.g_grp[3].u_grp.xn;
      end
      1: begin
        w[3:0] = dut.u_cem.g_grp[0].u_grp.x; w[7:4] = dut.u_cem.g_grp[1].u_grp.x;
        w[11:8] = dut.u_cem.g_grp[2].u_grp.x; w[15:12] = dut.u_cem.g_grp[3].u_grp.x;
      end
      default: begin
        w[3:0] = dut.u_cem.g_grp[0].u_grp.c_n; w[7:4] = dut.u_cem.g_grp[1].u_grp.c_n;
        w[11:8] = dut.u_cem.g_grp[2].u_grp.c_n; w[15:12] = dut.u_cem.g_grp[3].u_grp.c_n;
      end
    endcase
    return w;
  endfunction

  task automatic expect_eq(input string what, input logic [N-1:0] got, input logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'b1010101010101010;
    b = 16'b1001100110011001;
    #1;
    expect_eq("set1 XNOR", get_word(0), 16'b1100110011001100);
    expect_eq("set1 XOR", get_word(1), 16'b0011001100110011);
    expect_eq("set2 E3..E0", 16'(dut.u_cem.e[4:1]), 16'b1000);
    expect_eq("set2 AEB", 16'(dut.u_cem.aeb), 16'b0);
    expect_eq("set3 flags", get_word(2), 16'b1101111111111111);
    expect_eq("set4 G3..G0", 16'(dut.u_cem.g), 16'b1000);
    expect_eq("set5 {ALB,AGB,AEB}", 16'({res.alb, res.agb, res.aeb}), 16'b010);

    // Swapped operands give A < B.
    {a, b} = {b, a};
    #1;
    expect_eq("swapped {ALB,AGB,AEB}", 16'({res.alb, res.agb, res.aeb}), 16'b100);

    for (int n = 0; n < 3000; n++) begin
      a = 16'($urandom);
      b = (n % 10 == 0) ? a : 16'($urandom);
      #1;
      expect_eq("random {ALB,AGB,AEB}", 16'({res.alb, res.agb, res.aeb}),
                16'({a < b, a > b, a == b}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
