// Final module (FM), set 5: turns the group results into the three outputs.
//
// A < B holds when no group decided A > B and A is not equal to B, so
// alb = NOR(all g, aeb_in). A > B is then whatever is neither less nor
// equal: agb = NOR(alb, aeb_in). aeb passes straight through. The two NOR
// gates and their inputs follow the design.
//
// Interface: g [NG-1:0], aeb_in in; alb, agb, aeb out. Purely
// combinational.
module fm_final #(
  parameter int unsigned NG = mc_pkg::DEFAULT_N / mc_pkg::GROUP_W
) (
  input  logic [NG-1:0] g,
  input  logic          aeb_in,
  output logic          alb,
  output logic          agb,
  output logic          aeb
);

  always_comb begin
    alb = ~((|g) | aeb_in);
    agb = ~(alb | aeb_in);
    aeb = aeb_in;
  end

endmodule : fm_final
