// Comparison evaluation module (CEM): sets 1 to 4 for N-bit operands.
//
// The operands are cut into N/GROUP_W groups, group N/GROUP_W-1 holding the
// most significant bits. Each group is a cem_group slice. The E control bit
// enters the most significant group as 1 and ripples down through the set-2
// stages; what leaves group 0 is A = B. Each group also reports g, which is 1
// only in the group where A and B first differ and A holds the 1 there.
// N and the four-bit groups follow the design; N must be a multiple of
// GROUP_W.
//
// Interface: a, b [N-1:0] in; g [N/GROUP_W-1:0] (index = group, 0 = least
// significant), aeb out. Purely combinational. Two assertions check that
// at most one g is set and none is set when aeb is.
module cem #(
  parameter int unsigned N       = mc_pkg::DEFAULT_N,
  parameter int unsigned GROUP_W = mc_pkg::GROUP_W,
  localparam int unsigned NG     = N / GROUP_W
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [NG-1:0] g,
  output logic          aeb
);

  if (N % GROUP_W != 0 || N == 0) begin : g_bad_n
    $error("cem: N (%0d) must be a non-zero multiple of GROUP_W (%0d)", N, GROUP_W);
  end

  // e[k] is the E input of group k: all groups above k are equal.
  logic [NG:0] e;
  assign e[NG] = 1'b1;

  for (genvar k = NG - 1; k >= 0; k--) begin : g_grp
    cem_group #(.GROUP_W(GROUP_W)) u_grp (
      .a    (a[k*GROUP_W +: GROUP_W]),
      .b    (b[k*GROUP_W +: GROUP_W]),
      .e_in (e[k+1]),
      .e_out(e[k]),
      .g    (g[k])
    );
  end

  assign aeb = e[0];

  // Only the group holding the most significant difference can raise g, and
  // equal operands raise none. Checked once the time step has settled.
  always_comb begin
    assert final ($onehot0(g))
      else $error("cem: more than one group reports A > B (g = %h)", g);
    assert final (!(aeb && g != '0))
      else $error("cem: A = B together with a group reporting A > B");
  end

endmodule : cem
