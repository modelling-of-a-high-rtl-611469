// Self-checking testbench for set3_bit_decide. For every e_in and every pair
// of 4-bit nibbles A, B it derives x and xn, and expects exactly one active
// (0) flag, at the most significant differing bit, when e_in = 1 and A > B,
// and no active flag otherwise. It also drives x/xn patterns that set 1
// never produces to check each NAND input one by one.
module tb_set3_bit_decide;
  logic       e_in;
  logic [3:0] a, b, x, xn, c_n;
  int checks = 0, failures = 0;

  set3_bit_decide #(.GROUP_W(4)) dut (.e_in(e_in), .a(a), .x(x), .xn(xn), .c_n(c_n));

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
          logic [3:0] exp;
          e_in = e[0];
          a    = va[3:0];
          b    = vb[3:0];
          x    = a ^ b;
          xn   = ~(a ^ b);
          exp  = 4'hF;
          if (e == 1 && va > vb) begin
            // Position of the most significant differing bit.
            for (int i = 3; i >= 0; i--)
              if (a[i] != b[i]) begin
                exp[i] = 1'b0;
                break;
              end
          end
          #1;
          checks++;
          if (c_n !== exp) begin
            failures++;
            $display("FAIL e=%0d a=%b b=%b c_n=%b exp=%b", e, a, b, c_n, exp);
          end
        end
    // Each input of the bit-0 NAND matters: all high gives 0, any one low gives 1.
    e_in = 1'b1; a = 4'b0001; x = 4'b0001; xn = 4'b1110;
    #1; checks++;
    if (c_n[0] !== 1'b0) begin failures++; $display("FAIL all-high bit0"); end
    for (int k = 0; k < 6; k++) begin
      e_in = 1'b1; a = 4'b0001; x = 4'b0001; xn = 4'b1110;
      case (k)
        0: e_in  = 1'b0;
        1: a[0]  = 1'b0;
        2: x[0]  = 1'b0;
        3: xn[1] = 1'b0;
        4: xn[2] = 1'b0;
        default: xn[3] = 1'b0;
      endcase
      #1; checks++;
      if (c_n[0] !== 1'b1) begin failures++; $display("FAIL input %0d of bit0 NAND ignored", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
