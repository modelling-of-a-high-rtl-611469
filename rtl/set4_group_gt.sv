// Set 4: group result.
//
// A NAND over the group's active-low set-3 flags: g is 1 when one bit of
// this group decides A > B. Because set 3 only fires inside the group where
// A and B first differ, at most one group of the operand raises g. The NAND
// type follows the design.
//
// Interface: c_n[GROUP_W-1:0] in; g out. Purely combinational.
module set4_group_gt #(
  parameter int unsigned GROUP_W = mc_pkg::GROUP_W
) (
  input  logic [GROUP_W-1:0] c_n,
  output logic               g
);

  always_comb g = ~(&c_n);

endmodule : set4_group_gt
