// N-bit unsigned magnitude comparator built as a five-set gate network.
//
// Sets 1 to 4 form the comparison evaluation module (cem): bitwise XOR/XNOR,
// a group equality chain, per-bit decision flags and per-group results.
// Set 5 is the final module (fm_final), which derives A < B and A > B from
// the group results and the equality bit. The structure and N = 64 follow
// the design; the result struct port is this RTL's packaging of its three
// outputs A > B, A = B, A < B.
//
// Interface: a, b [N-1:0] in; res (cmp_result_t: agb, aeb, alb) out,
// exactly one flag set. Purely combinational: no clock, no reset, the result
// is valid one gate-network delay after the operands change.
module magnitude_comparator #(
  parameter int unsigned N = mc_pkg::DEFAULT_N
) (
  input  logic [N-1:0]        a,
  input  logic [N-1:0]        b,
  output mc_pkg::cmp_result_t res
);

  localparam int unsigned NG = N / mc_pkg::GROUP_W;

  logic [NG-1:0] g;
  logic          aeb_cem;

  cem #(.N(N), .GROUP_W(mc_pkg::GROUP_W)) u_cem (
    .a  (a),
    .b  (b),
    .g  (g),
    .aeb(aeb_cem)
  );

  fm_final #(.NG(NG)) u_fm (
    .g     (g),
    .aeb_in(aeb_cem),
    .alb   (res.alb),
    .agb   (res.agb),
    .aeb   (res.aeb)
  );

endmodule : magnitude_comparator
