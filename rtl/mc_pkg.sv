// Shared constants and types of the magnitude comparator.
//
// The comparator works on operands cut into groups of GROUP_W bits (nibbles).
// cmp_result_t bundles the three mutually exclusive outcome flags that the
// final module produces; exactly one of them is 1 for any pair of operands.
// The group width of four bits follows the design; the struct is a
// convenience of this RTL.
package mc_pkg;

  // Bits per group of the comparison evaluation module (sets 1-4).
  localparam int unsigned GROUP_W = 4;

  // Operand width of the reference configuration.
  localparam int unsigned DEFAULT_N = 64;

  typedef struct packed {
    logic agb;  // A > B
    logic aeb;  // A = B
    logic alb;  // A < B
  } cmp_result_t;

endpackage : mc_pkg
