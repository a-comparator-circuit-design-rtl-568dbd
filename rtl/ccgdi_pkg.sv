// ccgdi_pkg: types shared by the cyclic GDI circuits.
//
// cmp_result_t bundles the three outputs of the 2-bit magnitude comparator.
// Exactly one of the three bits is 1 for any pair of operands. The field
// order {gt, eq, lt} is this design's own choice.
package ccgdi_pkg;

  // Result of a magnitude comparison of A against B.
  typedef struct packed {
    logic gt;  // A > B
    logic eq;  // A = B
    logic lt;  // A < B
  } cmp_result_t;

  // Transistor budget of the two circuits: each GDI cell is one pMOS and
  // one nMOS, each static inverter also two transistors.
  localparam int unsigned GDI_CELL_TRANSISTORS = 2;
  localparam int unsigned EXAMPLE1_TRANSISTORS = 16;
  localparam int unsigned COMPARATOR2_TRANSISTORS = 30;

endpackage
