// tb_ccgdi_example1: self-checking test of the cyclic three-function circuit.
//
// Expected outputs come from the published truth table of f1, f2, f3,
// held here as a constant table indexed by {x1, x2, x3}. Because the
// circuit has a feedback loop, its result must not depend on the value the
// loop held before: every input value is therefore applied after every
// other input value (all 64 ordered pairs), and the outputs are checked
// after each step. Each step also checks the cyclic relations the circuit
// is built on (f1 from f2, f2 from f3, f3 from f1). A watchdog ends the
// run with a failure if the stimulus never finishes.
`timescale 1ns/1ps
module tb_ccgdi_example1;

  logic x1, x2, x3;
  logic f1, f2, f3;
  int checks = 0;
  int failures = 0;

  // Truth table {f1, f2, f3} for {x1, x2, x3} = 0 .. 7.
  localparam logic [2:0] Expected [8] = '{
    3'b011, 3'b101, 3'b101, 3'b000, 3'b101, 3'b110, 3'b010, 3'b010
  };

  ccgdi_example1 dut (.*);

  task automatic check_now();
    logic [2:0] idx;
    idx = {x1, x2, x3};
    checks++;
    if ({f1, f2, f3} !== Expected[idx]) begin
      failures++;
      $display("FAIL x=%03b: f=%03b expected %03b", idx, {f1, f2, f3}, Expected[idx]);
    end
    // Cyclic relations: f1 = x3'f2' + x2'x3, f2 = x1'x2'x3' + x1 f3',
    // f3 = x1'f1 + x2'x3'.
    checks++;
    if (f1 !== ((!x3 && !f2) || (!x2 && x3)) ||
        f2 !== ((!x1 && !x2 && !x3) || (x1 && !f3)) ||
        f3 !== ((!x1 && f1) || (!x2 && !x3))) begin
      failures++;
      $display("FAIL x=%03b: cyclic relations violated, f=%03b", idx, {f1, f2, f3});
    end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int from = 0; from < 8; from++) begin
      for (int to = 0; to < 8; to++) begin
        {x1, x2, x3} = 3'(from);
        #5;
        check_now();
        {x1, x2, x3} = 3'(to);
        #5;
        check_now();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
