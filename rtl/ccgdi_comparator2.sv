// ccgdi_comparator2: 2-bit magnitude comparator built as a cyclic
// combinational circuit of GDI cells (30 transistors).
//
// Operands A = {a[1], a[0]} and B = {b[1], b[0]}. The outputs G (A > B),
// E (A = B) and L (A < B) feed each other in the cycle G <- L <- E <- G:
//   G = L' (A1 B1' + A0 B0')
//   L = A1' B1 + E' B0 (A1' + B1)
//   E = A1' B1' (A0 xnor B0) + A1 G' (A0 + B0')
// Why the loop always resolves, case by case on the inputs:
//   A1 = 0          : E depends on inputs only, then L from E, then G from L.
//   A1 = 1, B1 = 0  : L = 0, so G = 1 and E = 0.
//   A1 = 1, B1 = 1  : B0 = 0 gives L = 0, G = A0, E = A0';
//                     B0 = 1 gives G = 0, E = A0, L = A0'.
// So for every input value the feedback is cut somewhere, and the outputs
// do not depend on what the loop held before: the circuit is combinational.
//
// Netlist, fifteen GDI cells (gdi_cell, out = g ? n : p), two transistors
// each, the inverter plus XNOR cell forming the usual 4-transistor XNOR:
//   G path : a1b1n = F1(g=b1,p=a1)  a0b0n = F1(g=b0,p=a0)
//            gsum  = OR(g=a1b1n,p=a0b0n)        gt = F1(g=lt,p=gsum)
//   L path : a1nb1 = F1(g=a1,p=b1)   a1n_or_b1 = F2(g=a1,n=b1)
//            eb0   = F1(g=eq,p=b0)   prod = AND(g=eb0,n=a1n_or_b1)
//            lt    = OR(g=a1nb1,p=prod)
//   E path : b0_n  = INV(b0)         x0 = XNOR(g=a0,n=b0,p=b0_n)
//            e_lo  = F1(g=b1,p=x0)   a0_or_b0n = OR(g=a0,p=b0_n)
//            e_hi  = F1(g=gt,p=a0_or_b0n)        eq = MUX(g=a1,n=e_hi,p=e_lo)
// The cyclic equations, the dependency order and the 30-transistor total
// are those of the published comparator; the mapping of terms onto cells
// is this design's own, chosen so that the count comes out at 30.
//
// Interface: inputs a[1:0], b[1:0]; output res (ccgdi_pkg::cmp_result_t,
// fields gt, eq, lt). Purely combinational.
//
// Circuit warning that stands: the netlist holds the combinational loop
// gt -> e_hi -> eq -> eb0 -> prod -> lt -> gt on purpose; it is the point of
// the cyclic technique and is cut by the inputs for every input value.
module ccgdi_comparator2
  import ccgdi_pkg::*;
(
  input  logic [1:0]  a,
  input  logic [1:0]  b,
  output cmp_result_t res
);

  // Fifteen two-transistor cells make up the published 30-transistor count.
  localparam int unsigned NumCells = 15;
  if (NumCells * GDI_CELL_TRANSISTORS != COMPARATOR2_TRANSISTORS) begin : g_count_check
    $error("ccgdi_comparator2: cell count does not match the transistor budget");
  end

  logic gt, eq, lt;  // the three cyclic outputs

  // ---- G = L' (A1 B1' + A0 B0') -------------------------------------------
  logic a1b1n, a0b0n, gsum;
  gdi_cell u_a1b1n (.g(b[1]),  .p(a[1]),  .n(1'b0), .out(a1b1n)); // A1 B1'
  gdi_cell u_a0b0n (.g(b[0]),  .p(a[0]),  .n(1'b0), .out(a0b0n)); // A0 B0'
  gdi_cell u_gsum  (.g(a1b1n), .p(a0b0n), .n(1'b1), .out(gsum));  // OR
  gdi_cell u_gt    (.g(lt),    .p(gsum),  .n(1'b0), .out(gt));    // L' gsum

  // ---- L = A1' B1 + E' B0 (A1' + B1) --------------------------------------
  logic a1nb1, a1n_or_b1, eb0, prod;
  gdi_cell u_a1nb1     (.g(a[1]),  .p(b[1]), .n(1'b0),      .out(a1nb1));     // A1' B1
  gdi_cell u_a1n_or_b1 (.g(a[1]),  .p(1'b1), .n(b[1]),      .out(a1n_or_b1)); // A1' + B1
  gdi_cell u_eb0       (.g(eq),    .p(b[0]), .n(1'b0),      .out(eb0));       // E' B0
  gdi_cell u_prod      (.g(eb0),   .p(1'b0), .n(a1n_or_b1), .out(prod));      // AND
  gdi_cell u_lt        (.g(a1nb1), .p(prod), .n(1'b1),      .out(lt));        // OR

  // ---- E = A1' B1' (A0 xnor B0) + A1 G' (A0 + B0') ------------------------
  logic b0_n, x0, e_lo, a0_or_b0n, e_hi;
  gdi_cell u_b0_n      (.g(b[0]), .p(1'b1),      .n(1'b0), .out(b0_n));      // B0'
  gdi_cell u_x0        (.g(a[0]), .p(b0_n),      .n(b[0]), .out(x0));        // XNOR
  gdi_cell u_e_lo      (.g(b[1]), .p(x0),        .n(1'b0), .out(e_lo));      // B1' x0
  gdi_cell u_a0_or_b0n (.g(a[0]), .p(b0_n),      .n(1'b1), .out(a0_or_b0n)); // A0 + B0'
  gdi_cell u_e_hi      (.g(gt),   .p(a0_or_b0n), .n(1'b0), .out(e_hi));      // G' (..)
  gdi_cell u_eq        (.g(a[1]), .p(e_lo),      .n(e_hi), .out(eq));        // A1 ? hi : lo

  assign res = '{gt: gt, eq: eq, lt: lt};

endmodule
