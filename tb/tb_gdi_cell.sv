// tb_gdi_cell: self-checking test of the GDI cell in each of its
// configurations from the GDI function table.
//
// Seven instances of gdi_cell are wired as inverter, F1 (A'B), F2 (A'+B),
// OR, AND, MUX (A'B + AC), XOR and XNOR (the last two with a testbench
// inverter for B'). All eight values of A, B, C are applied and every
// output is compared with the Boolean formula of its configuration,
// computed here with ordinary operators. A time-based watchdog ends the
// run with a failure if the stimulus never finishes.
`timescale 1ns/1ps
module tb_gdi_cell;

  logic a, b, c;
  logic y_inv, y_f1, y_f2, y_or, y_and, y_mux, y_xor, y_xnor;
  int checks = 0;
  int failures = 0;

  gdi_cell u_inv  (.g(a), .n(1'b0), .p(1'b1), .out(y_inv));
  gdi_cell u_f1   (.g(a), .n(1'b0), .p(b),    .out(y_f1));
  gdi_cell u_f2   (.g(a), .n(b),    .p(1'b1), .out(y_f2));
  gdi_cell u_or   (.g(a), .n(1'b1), .p(b),    .out(y_or));
  gdi_cell u_and  (.g(a), .n(b),    .p(1'b0), .out(y_and));
  gdi_cell u_mux  (.g(a), .n(c),    .p(b),    .out(y_mux));
  gdi_cell u_xor  (.g(a), .n(~b),   .p(b),    .out(y_xor));
  gdi_cell u_xnor (.g(a), .n(b),    .p(~b),   .out(y_xnor));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b c=%0b: got %0b expected %0b", what, a, b, c, got, exp);
    end
  endtask

  initial begin : watchdog
    #10us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check("INV",  y_inv,  !a);
      check("F1",   y_f1,   !a && b);
      check("F2",   y_f2,   !a || b);
      check("OR",   y_or,   a || b);
      check("AND",  y_and,  a && b);
      check("MUX",  y_mux,  (!a && b) || (a && c));
      check("XOR",  y_xor,  (!a && b) || (a && !b));
      check("XNOR", y_xnor, (a && b) || (!a && !b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
