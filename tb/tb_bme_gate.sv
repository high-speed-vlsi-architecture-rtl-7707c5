// Self-checking testbench for bme_gate.
// Runs all 16 inputs and compares each output with the gate's definition
// written as a selection on X: for X = 1, Q = Y xor Z, R = T xor Z and
// S = Z xor T; for X = 0, Q = R = Z and S = Y xor Z xor T. P must equal X.
module tb_bme_gate;

  logic x, y, z, t, p, q, r, s;
  int   checks = 0, failures = 0;

  bme_gate dut (.x, .y, .z, .t, .p, .q, .r, .s);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: xyzt=%b%b%b%b pqrs=%b%b%b%b", what, x, y, z, t, p, q, r, s);
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
    for (int v = 0; v < 16; v++) begin
      {x, y, z, t} = 4'(v);
      #1;
      check(p == x, "P");
      if (x) begin
        check(q == (y != z), "Q");
        check(r == (t != z), "R");
        check(s == (z != t), "S");
      end else begin
        check(q == z, "Q");
        check(r == z, "R");
        check(s == ((y + z + t) % 2 == 1), "S");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
