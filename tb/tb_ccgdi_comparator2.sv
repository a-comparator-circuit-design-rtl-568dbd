// tb_ccgdi_comparator2: self-checking test of the cyclic 2-bit comparator.
//
// Expected results are computed with the integer comparison operators on A
// and B. Every operand pair is applied after every other operand pair (all
// 256 ordered transitions), so a result that depended on the previous state
// of the feedback loop would show. Each step checks the three outputs
// against >, ==, <, checks that exactly one is set, and checks the cyclic
// relations the circuit is built on. A watchdog ends the run with a failure
// if the stimulus never finishes.
`timescale 1ns/1ps
module tb_ccgdi_comparator2;
  import ccgdi_pkg::*;

  logic [1:0]  a, b;
  cmp_result_t res;
  int checks = 0;
  int failures = 0;

  ccgdi_comparator2 dut (.a(a), .b(b), .res(res));

  task automatic check_now();
    logic g, e, l;
    g = (a > b);
    e = (a == b);
    l = (a < b);
    checks++;
    if (res.gt !== g || res.eq !== e || res.lt !== l) begin
      failures++;
      $display("FAIL A=%0d B=%0d: gt/eq/lt=%0b%0b%0b expected %0b%0b%0b",
               a, b, res.gt, res.eq, res.lt, g, e, l);
    end
    checks++;
    if (!$onehot({res.gt, res.eq, res.lt})) begin
      failures++;
      $display("FAIL A=%0d B=%0d: outputs not one-hot", a, b);
    end
    // G = L'(A1B1' + A0B0'), L = A1'B1 + E'B0(A1'+B1),
    // E = A1'B1'(A0 xnor B0) + A1 G'(A0 + B0')
    checks++;
    if (res.gt !== (!res.lt && ((a[1] && !b[1]) || (a[0] && !b[0]))) ||
        res.lt !== ((!a[1] && b[1]) || (!res.eq && b[0] && (!a[1] || b[1]))) ||
        res.eq !== ((!a[1] && !b[1] && (a[0] == b[0])) || (a[1] && !res.gt && (a[0] || !b[0])))) begin
      failures++;
      $display("FAIL A=%0d B=%0d: cyclic relations violated", a, b);
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
    for (int from = 0; from < 16; from++) begin
      for (int to = 0; to < 16; to++) begin
        {a, b} = 4'(from);
        #5;
        check_now();
        {a, b} = 4'(to);
        #5;
        check_now();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
