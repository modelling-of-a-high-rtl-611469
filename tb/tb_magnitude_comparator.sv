// End-to-end testbench for magnitude_comparator at its default width
// (N = 64, 16 groups). Expected results come from plain unsigned integer
// comparison of the operands.
//
// Stimulus: random operands; equal operands; for every bit position,
// operand pairs whose most significant difference is at that bit, in both
// directions; and the extreme values 0 and all-ones. The testbench counts
// how often each mechanism of the network was exercised and counts a
// failure for any that never was: each outcome (A>B, A=B, A<B), the
// decision falling in each of the 16 groups, and at each of the four bit
// positions inside a group (each set-3 NAND width), in both directions.
// The design is combinational; each vector is checked 1 time unit after it
// is applied.
module tb_magnitude_comparator;
  import mc_pkg::*;

  localparam int N  = DEFAULT_N;
  localparam int NG = N / GROUP_W;

  logic [N-1:0] a, b;
  cmp_result_t  res;
  int checks = 0, failures = 0;

  int n_gt = 0, n_eq = 0, n_lt = 0;
  int grp_gt [NG], grp_lt [NG];
  int pos_gt [GROUP_W], pos_lt [GROUP_W];

  magnitude_comparator dut (.a(a), .b(b), .res(res));

  task automatic check();
    cmp_result_t exp;
    exp.agb = (a > b);
    exp.aeb = (a == b);
    exp.alb = (a < b);
    #1;
    checks++;
    if (res !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h got agb=%b aeb=%b alb=%b", a, b, res.agb, res.aeb, res.alb);
    end
    // Coverage of the mechanisms, derived from the operands.
    if (a == b) n_eq++;
    else begin
      for (int i = N - 1; i >= 0; i--)
        if (a[i] != b[i]) begin
          if (a > b) begin
            n_gt++; grp_gt[i / GROUP_W]++; pos_gt[i % GROUP_W]++;
          end else begin
            n_lt++; grp_lt[i / GROUP_W]++; pos_lt[i % GROUP_W]++;
          end
          break;
        end
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (grp_gt[k]) begin grp_gt[k] = 0; grp_lt[k] = 0; end
    foreach (pos_gt[k]) begin pos_gt[k] = 0; pos_lt[k] = 0; end

    // Extremes.
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = '1; b = '0; check();
    a = '0; b = '1; check();

    // Most significant difference at each bit, both directions, with random
    // lower bits so that the lower groups disagree with the verdict.
    for (int i = 0; i < N; i++)
      for (int r = 0; r < 4; r++) begin
        logic [N-1:0] hi, mask;
        hi   = {$urandom, $urandom};
        mask = (i == N - 1) ? '0 : ({N{1'b1}} << (i + 1));
        a = (hi & mask) | ({$urandom, $urandom} & ~mask);
        b = (hi & mask) | ({$urandom, $urandom} & ~mask);
        a[i] = r[0];
        b[i] = ~r[0];
        check();
      end

    // Equal operands.
    for (int n = 0; n < 200; n++) begin
      a = {$urandom, $urandom};
      b = a;
      check();
    end

    // Fully random operands.
    for (int n = 0; n < 5000; n++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      check();
    end

    // Every mechanism must have been exercised.
    if (n_gt == 0 || n_eq == 0 || n_lt == 0) begin
      failures++;
      $display("MISSING outcome: gt=%0d eq=%0d lt=%0d", n_gt, n_eq, n_lt);
    end
    for (int k = 0; k < NG; k++)
      if (grp_gt[k] == 0 || grp_lt[k] == 0) begin
        failures++;
        $display("MISSING decision in group %0d", k);
      end
    for (int k = 0; k < GROUP_W; k++)
      if (pos_gt[k] == 0 || pos_lt[k] == 0) begin
        failures++;
        $display("MISSING decision at bit %0d of a group", k);
      end
    $display("coverage: A>B %0d, A=B %0d, A<B %0d; group 0 decided %0d/%0d, group %0d decided %0d/%0d",
             n_gt, n_eq, n_lt, grp_gt[0], grp_lt[0], NG - 1, grp_gt[NG-1], grp_lt[NG-1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
