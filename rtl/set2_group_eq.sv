// Set 2: one stage of the group equality chain.
//
// E for a group means "every more significant group of A and B is equal".
// This stage ANDs the incoming E with the group's XNOR bits, giving E for the
// next less significant group. The stage of group 0 produces A = B (AEB).
// The AND structure and the chaining from group to group follow the design;
// the E of the most significant group is tied to 1 by the caller.
//
// Interface: e_in, xn[GROUP_W-1:0] in; e_out out. Purely combinational.
module set2_group_eq #(
  parameter int unsigned GROUP_W = mc_pkg::GROUP_W
) (
  input  logic               e_in,
  input  logic [GROUP_W-1:0] xn,
  output logic               e_out
);

  always_comb e_out = e_in & (&xn);

endmodule : set2_group_eq
