// Set 3: per-bit decision flags of one group.
//
// Bit i of a group decides A > B when all more significant groups are equal
// (E), all more significant bits inside the group are equal, A_i = 1 and
// B_i = 0. Each flag is a NAND, so c_n[i] is 0 exactly at the deciding bit
// and at most one flag of the whole operand is 0. The NAND type and the use
// of E and set-1 outputs follow the design. Which set-1 outputs enter each
// NAND is this RTL's reading: E, A_i, the XOR bit of i (A_i AND X_i equals
// A_i AND NOT B_i) and the XNOR bits above i, so the most significant bit's
// NAND has the fewest inputs.
//
// Interface: e_in, a, x, xn (GROUP_W bits each, bit GROUP_W-1 most
// significant) in; c_n[GROUP_W-1:0] active-low out. Purely combinational.
module set3_bit_decide #(
  parameter int unsigned GROUP_W = mc_pkg::GROUP_W
) (
  input  logic               e_in,
  input  logic [GROUP_W-1:0] a,
  input  logic [GROUP_W-1:0] x,
  input  logic [GROUP_W-1:0] xn,
  output logic [GROUP_W-1:0] c_n
);

  always_comb begin
    logic higher_eq;  // all bits above the current one are equal
    higher_eq = 1'b1;
    for (int i = GROUP_W - 1; i >= 0; i--) begin
      c_n[i]    = ~(e_in & a[i] & x[i] & higher_eq);
      higher_eq = higher_eq & xn[i];
    end
  end

endmodule : set3_bit_decide
