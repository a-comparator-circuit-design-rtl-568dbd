// tb_ccgdi_top: end-to-end test of both cyclic GDI circuits in ccgdi_top.
//
// Three phases drive the top at its default (and only) configuration:
//   1. Example 1 run: the eight values of {x1, x2, x3} applied as a binary
//      count, one every 10 ns, 80 ns in all.
//   2. Comparator run: the sixteen values of {A1, A0, B1, B0} applied as a
//      binary count, one every 10 ns, 160 ns in all. Both circuits are
//      driven at once, Example 1 with the low three bits of the count.
//   3. A pseudo-random run of 2000 steps on both circuits.
// After each step the outputs are compared with reference values worked
// out here: the integer comparison of A and B, and the truth table of f1,
// f2, f3 written as sums of minterms.
//
// The mechanisms of the cyclic technique are counted, and each must occur:
//   - for each of the six outputs, a step where it is formed from its
//     feedback input (the loop carries the value), and
//   - each way the loop is cut by the inputs: Example 1 cut at f2 (x1=0)
//     and at f3 (x1=1); comparator cut at E (A1=0), at L with B1=0, at L
//     with B1=1 and B0=0, and at G with B1=1 and B0=1.
// Independently of the circuit, every step also evaluates both cyclic
// equation sets in three-valued logic with the feedback wires starting
// unknown, and checks that all outputs become known and equal the circuit's
// (counted as ResolvedEx1 / ResolvedCmp).
// A watchdog ends the run with a failure if the stimulus never finishes.
`timescale 1ns/1ps
module tb_ccgdi_top;
  import ccgdi_pkg::*;
  import ternary_pkg::*;

  logic [1:0]  a, b;
  logic [2:0]  x;
  cmp_result_t cmp;
  logic [2:0]  f;
  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  typedef enum int {
    UseF2InF1, UseF3InF2, UseF1InF3, UseLInG, UseEInL, UseGInE,
    CutEx1AtF2, CutEx1AtF3, CutCmpAtE, CutCmpB1Low, CutCmpB0Low, CutCmpB0High,
    ResolvedEx1, ResolvedCmp,
    NumEvents
  } event_e;
  int seen [NumEvents];

  ccgdi_top dut (.a(a), .b(b), .cmp(cmp), .x(x), .f(f));

  // Reference for Example 1 as sums of minterms of {x1, x2, x3}.
  function automatic logic [2:0] ex1_ref(logic [2:0] v);
    logic r1, r2, r3;
    r1 = (v == 3'd1) || (v == 3'd2) || (v == 3'd4) || (v == 3'd5);
    r2 = (v == 3'd0) || (v == 3'd5) || (v == 3'd6) || (v == 3'd7);
    r3 = (v == 3'd0) || (v == 3'd1) || (v == 3'd2) || (v == 3'd4);
    return {r1, r2, r3};
  endfunction

  // Ternary fixed point of f1 = x3'f2' + x2'x3, f2 = x1'x2'x3' + x1 f3',
  // f3 = x1'f1 + x2'x3', starting from unknown feedback. Returns 1 and the
  // outputs when all three become known within three passes.
  function automatic logic ex1_ternary(logic [2:0] v, output logic [2:0] res);
    tern_e x1, x2, x3, t1, t2, t3;
    x1 = t_of(v[2]);
    x2 = t_of(v[1]);
    x3 = t_of(v[0]);
    t1 = TU;
    t2 = TU;
    t3 = TU;
    for (int pass = 0; pass < 3; pass++) begin
      t1 = t_or(t_and(t_not(x3), t_not(t2)), t_and(t_not(x2), x3));
      t2 = t_or(t_and(t_and(t_not(x1), t_not(x2)), t_not(x3)), t_and(x1, t_not(t3)));
      t3 = t_or(t_and(t_not(x1), t1), t_and(t_not(x2), t_not(x3)));
    end
    res = {t1 == T1, t2 == T1, t3 == T1};
    return (t1 != TU) && (t2 != TU) && (t3 != TU);
  endfunction

  // Ternary fixed point of G = L'(A1B1' + A0B0'), L = A1'B1 + E'B0(A1'+B1),
  // E = A1'B1'(A0 xnor B0) + A1 G'(A0 + B0'), from unknown feedback.
  function automatic logic cmp_ternary(logic [1:0] va, logic [1:0] vb,
                                       output logic [2:0] res);
    tern_e a1, a0, b1, b0, tg, te, tl, xn;
    a1 = t_of(va[1]);
    a0 = t_of(va[0]);
    b1 = t_of(vb[1]);
    b0 = t_of(vb[0]);
    xn = t_or(t_and(a0, b0), t_and(t_not(a0), t_not(b0)));
    tg = TU;
    te = TU;
    tl = TU;
    for (int pass = 0; pass < 3; pass++) begin
      tg = t_and(t_not(tl), t_or(t_and(a1, t_not(b1)), t_and(a0, t_not(b0))));
      tl = t_or(t_and(t_not(a1), b1), t_and(t_and(t_not(te), b0), t_or(t_not(a1), b1)));
      te = t_or(t_and(t_and(t_not(a1), t_not(b1)), xn), t_and(t_and(a1, t_not(tg)), t_or(a0, t_not(b0))));
    end
    res = {tg == T1, te == T1, tl == T1};
    return (tg != TU) && (te != TU) && (tl != TU);
  endfunction

  task automatic step_and_check(input logic [1:0] na, input logic [1:0] nb,
                                input logic [2:0] nx);
    a = na;
    b = nb;
    x = nx;
    #10;
    checks++;
    if (cmp.gt !== (a > b) || cmp.eq !== (a == b) || cmp.lt !== (a < b)) begin
      failures++;
      $display("FAIL %0t A=%0d B=%0d: gt/eq/lt=%0b%0b%0b", $time, a, b, cmp.gt, cmp.eq, cmp.lt);
    end
    checks++;
    if (f !== ex1_ref(x)) begin
      failures++;
      $display("FAIL %0t x=%03b: f=%03b expected %03b", $time, x, f, ex1_ref(x));
    end
    begin
      logic [2:0] t_f, t_c;
      checks++;
      if (!ex1_ternary(x, t_f) || t_f !== f) begin
        failures++;
        $display("FAIL %0t x=%03b: ternary evaluation %03b does not settle to f=%03b", $time, x, t_f, f);
      end else seen[ResolvedEx1]++;
      checks++;
      if (!cmp_ternary(a, b, t_c) || t_c !== {cmp.gt, cmp.eq, cmp.lt}) begin
        failures++;
        $display("FAIL %0t A=%0d B=%0d: ternary evaluation does not settle to the outputs", $time, a, b);
      end else seen[ResolvedCmp]++;
    end
    // Feedback actually used to form an output.
    if (!x[0])                                         seen[UseF2InF1]++;
    if (x[2])                                          seen[UseF3InF2]++;
    if (!x[2] && (x[1] || x[0]))                         seen[UseF1InF3]++;
    if ((a[1] && !b[1]) || (a[0] && !b[0]))            seen[UseLInG]++;
    if (b[0] && (!a[1] || b[1]) && !(!a[1] && b[1]))   seen[UseEInL]++;
    if (a[1])                                          seen[UseGInE]++;
    // Where the inputs cut the loop.
    if (!x[2]) seen[CutEx1AtF2]++;
    else       seen[CutEx1AtF3]++;
    if (!a[1])                    seen[CutCmpAtE]++;
    else if (!b[1])               seen[CutCmpB1Low]++;
    else if (!b[0])               seen[CutCmpB0Low]++;
    else                          seen[CutCmpB0High]++;
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < NumEvents; e++) seen[e] = 0;
    a = '0;
    b = '0;
    x = '0;
    #1;

    // 1. Example 1: 8 input combinations, 80 ns.
    for (int v = 0; v < 8; v++) step_and_check(2'd0, 2'd0, 3'(v));

    // 2. Comparator: 16 input combinations, 160 ns.
    for (int v = 0; v < 16; v++) begin
      logic [3:0] w;
      w = 4'(v);
      step_and_check(w[3:2], w[1:0], w[2:0]);
    end

    // 3. Random steps.
    for (int i = 0; i < 2000; i++) begin
      logic [6:0] r;
      r = 7'($urandom);
      step_and_check(r[6:5], r[4:3], r[2:0]);
    end

    for (int e = 0; e < NumEvents; e++) begin
      event_e ev;
      ev = event_e'(e);
      $display("mechanism %-13s occurred %0d times", ev.name(), seen[e]);
      checks++;
      if (seen[e] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", ev.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
