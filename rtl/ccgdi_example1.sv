// ccgdi_example1: three Boolean functions realised as a cyclic combinational
// circuit of GDI cells (16 transistors).
//
// The target functions of x1, x2, x3 are, by truth table (x1 x2 x3 -> f1 f2 f3):
//   000->011  001->101  010->101  011->000  100->101  101->110  110->010  111->010
// Instead of computing each output from the inputs alone, each output reuses
// another one, in the cycle f1 <- f2 <- f3 <- f1. The extra input turns many
// minterms into don't-cares and the functions shrink to
//   f1 = x3' f2' + x2' x3        (= x3 ? x2' : f2')
//   f2 = x1' x2' x3' + x1 f3'    (= x1 ? f3' : x2'x3')
//   f3 = x1' f1 + x2' x3'        (= x1 ? x2'x3' : f1 + x2'x3')
// The loop is never active for a fixed input: when x1 = 0, f2 depends on the
// inputs only, f1 on f2 and f3 on f1; when x1 = 1, f3 depends on the inputs
// only, f2 on f3 and f1 on f2. The outputs therefore settle to the same value
// whatever the feedback wires held before, and the circuit is combinational
// even though its netlist has a cycle.
//
// Netlist, eight GDI cells of two transistors each (gdi_cell, out = g ? n : p):
//   x2_n  = INV(x2)                  f2_n = INV(f2)      f3_n = INV(f3)
//   n23   = F1 (g=x3, p=x2_n)         = x2' x3'
//   f1    = MUX(g=x3, n=x2_n, p=f2_n)
//   f2    = MUX(g=x1, n=f3_n, p=n23)
//   f1or  = OR (g=f1, p=n23)
//   f3    = MUX(g=x1, n=n23,  p=f1or)
// The cyclic equations, the dependency order and the 16-transistor count
// are those of the published example; the exact assignment of terms to
// cells is this design's own.
//
// Interface: inputs x1, x2, x3; outputs f1, f2, f3. Purely combinational.
//
// Circuit warning that stands: the netlist contains the combinational loop
// f1 -> f1or -> f3 -> f3_n -> f2 -> f2_n -> f1 on purpose. It is the point
// of the technique and, as argued above, it is broken by the inputs for
// every input value, so it neither latches nor oscillates.
module ccgdi_example1 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic f1,
  output logic f2,
  output logic f3
);

  // Eight two-transistor cells make up the published 16-transistor count.
  localparam int unsigned NumCells = 8;
  if (NumCells * ccgdi_pkg::GDI_CELL_TRANSISTORS != ccgdi_pkg::EXAMPLE1_TRANSISTORS) begin : g_count_check
    $error("ccgdi_example1: cell count does not match the transistor budget");
  end

  logic x2_n;   // x2'
  logic n23;    // x2' x3'
  logic f2_n;   // f2', feedback into f1
  logic f3_n;   // f3', feedback into f2
  logic f1or;   // f1 + x2' x3', feedback path into f3

  // Inverters (GDI cell with P = 1, N = 0).
  gdi_cell u_inv_x2 (.g(x2), .p(1'b1), .n(1'b0), .out(x2_n));
  gdi_cell u_inv_f2 (.g(f2), .p(1'b1), .n(1'b0), .out(f2_n));
  gdi_cell u_inv_f3 (.g(f3), .p(1'b1), .n(1'b0), .out(f3_n));

  // F1 cell: x3' & x2'.
  gdi_cell u_n23    (.g(x3), .p(x2_n), .n(1'b0), .out(n23));

  // f1 = x3 ? x2' : f2'
  gdi_cell u_f1     (.g(x3), .p(f2_n), .n(x2_n), .out(f1));

  // f2 = x1 ? f3' : x2'x3'
  gdi_cell u_f2     (.g(x1), .p(n23),  .n(f3_n), .out(f2));

  // OR cell: f1 + x2'x3'
  gdi_cell u_f1or   (.g(f1), .p(n23),  .n(1'b1), .out(f1or));

  // f3 = x1 ? x2'x3' : f1 + x2'x3'
  gdi_cell u_f3     (.g(x1), .p(f1or), .n(n23),  .out(f3));

endmodule
