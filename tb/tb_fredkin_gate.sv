// Self-checking testbench for fredkin_gate.
// Runs all 8 inputs: P must equal A; B and C must pass to Q and R when A is
// 0 and be swapped when A is 1. It also checks that the gate is one-to-one
// and that it keeps the number of ones (a controlled swap is conservative).
module tb_fredkin_gate;

  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  bit   seen [8];

  fredkin_gate dut (.a, .b, .c, .p, .q, .r);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abc=%b%b%b pqr=%b%b%b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == a, "P");
      check({q, r} == (a ? {c, b} : {b, c}), "swap");
      check(int'(p) + int'(q) + int'(r) == int'(a) + int'(b) + int'(c), "ones kept");
      check(!seen[{p, q, r}], "one-to-one");
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
