// Self-checking testbench for ralu_cell.
// Applies all 256 combinations of A, B, Cin and S4..S0 and compares Result
// and Cout with the word-level reference model (at 1 bit). It also checks
// the garbage lines against what each gate passes through: g0 = S0,
// g1 = A, g3 = S3, g5 = S4, and g7 = the sum bit. Every operation class of
// the reference model must be reached.
module tb_ralu_cell;

  import ralu_pkg::*;
  import ralu_ref_pkg::*;

  logic        a, b, cin, result, cout;
  ralu_sel_t   sel;
  logic [7:0]  g;
  int          checks = 0, failures = 0;
  int          op_hits [NUM_OPS];

  ralu_cell dut (.a, .b, .sel, .cin, .result, .cout, .g);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%b b=%b cin=%b sel=%b result=%b cout=%b g=%b",
               what, a, b, cin, sel, result, cout, g);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exp_res;
    logic            exp_cout;
    for (int v = 0; v < 256; v++) begin
      {sel, cin, a, b} = 8'(v);
      #1;
      expect_out(1, sel, cin, 64'(a), 64'(b), exp_res, exp_cout);
      op_hits[classify(sel, cin)]++;
      check(result == exp_res[0], "result");
      check(cout == exp_cout, "cout");
      check(g[0] == sel.s0, "g0");
      check(g[1] == a, "g1");
      check(g[3] == sel.s3, "g3");
      check(g[5] == sel.s4, "g5");
      check(g[7] == (a ^ b ^ sel.s0 ^ cin), "g7");
    end
    for (int k = 0; k < NUM_OPS; k++) begin
      checks++;
      if (op_hits[k] == 0) begin
        failures++;
        $display("FAIL operation %s never applied", op_e'(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
