// Self-checking testbench for dkg_gate.
// Runs all 16 inputs. With A = 0 it checks that {R,S} is the integer sum
// B + C + D; with A = 1 that S - 2R is the integer difference B - C - D
// (difference and borrow). It also checks P = B, Q = (A ? not D : C), and
// that no two inputs give the same output vector.
module tb_dkg_gate;

  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  bit   seen [16];

  dkg_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abcd=%b%b%b%b pqrs=%b%b%b%b", what, a, b, c, d, p, q, r, s);
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
    int lhs, rhs;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      check(p == b, "P");
      check(q == (a ? ~d : c), "Q");
      if (!a) begin
        lhs = 2 * int'(r) + int'(s);
        rhs = int'(b) + int'(c) + int'(d);
        check(lhs == rhs, "adder");
      end else begin
        lhs = int'(s) - 2 * int'(r);
        rhs = int'(b) - int'(c) - int'(d);
        check(lhs == rhs, "subtractor");
      end
      check(!seen[{p, q, r, s}], "one-to-one");
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
