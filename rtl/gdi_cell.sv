// gdi_cell: logic model of the basic Gate Diffusion Input (GDI) cell.
//
// The cell is one pMOS and one nMOS transistor with a common gate G and a
// common drain that forms the output. The pMOS source is the input P, the
// nMOS source is the input N. When G is 1 the nMOS conducts and the output
// follows N; when G is 0 the pMOS conducts and the output follows P. As a
// logic function the cell is therefore a 2:1 multiplexer selected by G:
//
//   out = G ? N : P
//
// Tying P and N to constants or to other signals gives the cell's family of
// functions (G = A throughout):
//   N=0, P=1 : inverter  A'          N=0, P=B : F1   A'B
//   N=B, P=1 : F2        A'+B        N=1, P=B : OR   A+B
//   N=B, P=0 : AND       AB          N=C, P=B : MUX  A'B + AC
//   N=B', P=B: XOR (with an inverter for B', 4 transistors)
//   N=B, P=B': XNOR (likewise 4 transistors)
//
// Interface: three 1-bit inputs g, p, n and one 1-bit output out. The cell
// is purely combinational with no timing of its own. Its threshold drop
// and swing behaviour are analog effects that a two-state logic model does
// not represent; the cell structure and the function table follow the
// GDI technique as published, the port names follow the cell's terminals.
module gdi_cell (
  input  logic g,   // common gate of both transistors
  input  logic p,   // pMOS source/drain (passed when g = 0)
  input  logic n,   // nMOS source/drain (passed when g = 1)
  output logic out  // common drain
);

  always_comb begin
    if (g) out = n;  // nMOS on, pMOS off
    else   out = p;  // pMOS on, nMOS off
  end

endmodule
