// One GROUP_W-bit slice of the comparison evaluation module (sets 1 to 4).
//
// The slice takes its bits of A and B and the control bit E ("all more
// significant groups are equal"). Set 1 forms XOR and XNOR per bit, set 2
// passes E on to the next lower slice (e_out), set 3 finds the bit, if any,
// at which A > B is decided, and set 4 reduces those flags to the group
// result g. The slice boundary is the repeated column of the design.
//
// Interface: a, b [GROUP_W-1:0], e_in in; e_out, g out. Purely
// combinational; e_out ripples to the next slice.
module cem_group #(
  parameter int unsigned GROUP_W = mc_pkg::GROUP_W
) (
  input  logic [GROUP_W-1:0] a,
  input  logic [GROUP_W-1:0] b,
  input  logic               e_in,
  output logic               e_out,
  output logic               g
);

  logic [GROUP_W-1:0] x, xn, c_n;

  for (genvar i = 0; i < GROUP_W; i++) begin : g_set1
    set1_xor_xnor u_set1 (.a(a[i]), .b(b[i]), .x(x[i]), .xn(xn[i]));
  end

  set2_group_eq #(.GROUP_W(GROUP_W)) u_set2 (
    .e_in (e_in),
    .xn   (xn),
    .e_out(e_out)
  );

  set3_bit_decide #(.GROUP_W(GROUP_W)) u_set3 (
    .e_in(e_in),
    .a   (a),
    .x   (x),
    .xn  (xn),
    .c_n (c_n)
  );

  set4_group_gt #(.GROUP_W(GROUP_W)) u_set4 (
    .c_n(c_n),
    .g  (g)
  );

endmodule : cem_group
