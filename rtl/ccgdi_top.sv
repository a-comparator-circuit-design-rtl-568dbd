// ccgdi_top: the two cyclic GDI circuits side by side.
//
// The design holds the cyclic 2-bit magnitude comparator (ccgdi_comparator2)
// and the cyclic three-function circuit (ccgdi_example1). They share no
// signal; each has its own inputs and outputs, brought out unchanged. Both
// are purely combinational: outputs follow inputs with no clock and no
// latency. Pad cells that would surround the circuits on a chip are not
// part of this RTL.
//
// Interface:
//   a[1:0], b[1:0] -> cmp {gt, eq, lt}   comparison of A against B
//   x[2:0] = {x1, x2, x3} -> f[2:0] = {f1, f2, f3}
// Bit order of x and f (x1/f1 in the top bit) is this design's choice.
module ccgdi_top
  import ccgdi_pkg::*;
(
  input  logic [1:0]  a,
  input  logic [1:0]  b,
  output cmp_result_t cmp,
  input  logic [2:0]  x,
  output logic [2:0]  f
);

  ccgdi_comparator2 u_cmp (
    .a   (a),
    .b   (b),
    .res (cmp)
  );

  ccgdi_example1 u_ex1 (
    .x1 (x[2]),
    .x2 (x[1]),
    .x3 (x[0]),
    .f1 (f[2]),
    .f2 (f[1]),
    .f3 (f[0])
  );

endmodule
