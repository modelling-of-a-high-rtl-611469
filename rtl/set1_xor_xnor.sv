// Set 1: the per-bit EXOR-EXNOR cell of the comparison evaluation module.
//
// For one bit position it delivers both A XOR B and A XNOR B. The XNOR
// output says "this bit is equal" and feeds the equality chain (set 2) and
// the decision flags (set 3); the XOR output, together with A, tells set 3
// that A has the 1 and B the 0 at this position.
//
// In the design this is a seven-transistor CMOS gate that gives both
// polarities at full voltage swing. Only its logic function can be written
// as RTL; the transistor structure is not modelled.
//
// Interface: a, b in; x = a ^ b, xn = ~(a ^ b) out. Purely combinational.
module set1_xor_xnor (
  input  logic a,
  input  logic b,
  output logic x,
  output logic xn
);

  always_comb begin
    x  = a ^ b;
    xn = ~(a ^ b);
  end

endmodule : set1_xor_xnor
