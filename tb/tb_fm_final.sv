// Self-checking testbench for fm_final with 16 group inputs. It runs aeb_in
// against no group flag, every single group flag and random flag sets, and
// expects the three outputs from their definitions: agb when some group
// decided A > B and A != B, aeb when aeb_in, alb otherwise.
module tb_fm_final;
  localparam int NG = 16;
  logic [NG-1:0] g;
  logic          aeb_in, alb, agb, aeb;
  int checks = 0, failures = 0;

  fm_final #(.NG(NG)) dut (.g(g), .aeb_in(aeb_in), .alb(alb), .agb(agb), .aeb(aeb));

  task automatic check();
    logic e_agb, e_aeb, e_alb;
    e_aeb = aeb_in;
    e_agb = !aeb_in && (g != '0);
    e_alb = !aeb_in && (g == '0);
    #1;
    checks++;
    if ({agb, aeb, alb} !== {e_agb, e_aeb, e_alb}) begin
      failures++;
      $display("FAIL g=%h aeb_in=%b -> agb=%b aeb=%b alb=%b", g, aeb_in, agb, aeb, alb);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      aeb_in = e[0];
      g = '0;
      check();
      for (int k = 0; k < NG; k++) begin
        g = '0;
        g[k] = 1'b1;
        check();
      end
    end
    for (int n = 0; n < 200; n++) begin
      aeb_in = 1'b0;
      g = NG'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
