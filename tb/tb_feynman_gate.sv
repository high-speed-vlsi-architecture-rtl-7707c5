// Self-checking testbench for feynman_gate.
// Applies all four input pairs, checks P = A and Q = A xor B against a
// truth table written out here, and checks that the four output pairs are
// all different (the gate is reversible). A watchdog ends the run if it
// ever stalls.
module tb_feynman_gate;

  logic a, b, p, q;
  int   checks = 0, failures = 0;
  bit   seen [4];

  // Expected {P,Q} for input {A,B} = 00, 01, 10, 11.
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({p, q} !== EXP[v]) begin
        failures++;
        $display("FAIL a=%b b=%b: got p=%b q=%b", a, b, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %b%b produced twice", p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
