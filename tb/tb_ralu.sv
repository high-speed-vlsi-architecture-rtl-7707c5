// End-to-end testbench for the ralu top at its default width.
//
// For every one of the 64 settings of S4..S0 and Cin it applies directed
// operands (zero, all ones, alternating bits, a carry that must ripple the
// whole word) and random operands, and compares Result and Cout with the
// word-level reference model. It counts how often each mechanism of the
// design was exercised and fails if one never was: each of the 12
// operation classes, a carry rippling through all bits, a carry-out, a
// borrow (A - B with A < B), and switches between the arithmetic and logic
// paths (S4) and between the two logic outputs (S3).
module tb_ralu;

  import ralu_pkg::*;
  import ralu_ref_pkg::*;

  localparam int unsigned W = 16;

  logic [W-1:0]                      a, b, result;
  ralu_sel_t                         sel, prev_sel;
  logic                              cin, cout;
  logic [W-1:0][GARBAGE_PER_BIT-1:0] g;

  int checks = 0, failures = 0;
  int op_hits [NUM_OPS];
  int n_full_ripple = 0, n_carry_out = 0, n_borrow = 0;
  int n_mode_switch = 0, n_logic_switch = 0;

  ralu dut (.a, .b, .sel, .cin, .result, .cout, .g);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb,
                       input ralu_sel_t vs, input logic vc);
    longint unsigned exp_res;
    logic            exp_cout;
    logic [W-1:0]    bb;
    prev_sel = sel;
    a = va; b = vb; sel = vs; cin = vc;
    #1;
    expect_out(W, sel, cin, 64'(a), 64'(b), exp_res, exp_cout);
    checks++;
    if (result !== W'(exp_res) || cout !== exp_cout) begin
      failures++;
      $display("FAIL a=%h b=%h sel=%b cin=%b: result=%h cout=%b, expected %h %b",
               a, b, sel, cin, result, cout, W'(exp_res), exp_cout);
    end
    // Garbage lines that pass a select or operand straight through.
    checks++;
    for (int i = 0; i < W; i++) begin
      if (g[i][0] !== sel.s0 || g[i][1] !== a[i] || g[i][5] !== sel.s4) begin
        failures++;
        $display("FAIL garbage bit %0d: g=%b", i, g[i]);
        break;
      end
    end
    op_hits[classify(sel, cin)]++;
    bb = sel.s0 ? ~b : b;
    if (((a ^ bb) == '1) && cin && cout) n_full_ripple++;
    if (!sel.s4 && cout) n_carry_out++;
    if (!sel.s4 && sel.s0 && cin && (a < b) && !cout) n_borrow++;
    if (sel.s4 != prev_sel.s4) n_mode_switch++;
    if (sel.s4 && prev_sel.s4 && sel.s3 != prev_sel.s3) n_logic_switch++;
  endtask

  task automatic need(input int count, input string what);
    checks++;
    $display("%-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    logic [W-1:0] pats [6];
    pats = '{'0, '1, {(W/2){2'b01}}, {(W/2){2'b10}}, W'(1), {1'b1, {(W-1){1'b0}}}};
    sel = '0;
    for (int s = 0; s < 64; s++) begin
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++)
          apply(pats[i], pats[j], ralu_sel_t'(s[5:1]), s[0]);
      // A carry entering bit 0 must ripple through every bit.
      apply('1, '0, ralu_sel_t'(s[5:1]), s[0]);
      apply('0, '1, ralu_sel_t'(s[5:1]), s[0]);
      for (int k = 0; k < 200; k++)
        apply(W'($urandom), W'($urandom), ralu_sel_t'(s[5:1]), s[0]);
    end
    // Random select lines too, so that consecutive operations switch paths.
    for (int k = 0; k < 5000; k++)
      apply(W'($urandom), W'($urandom), ralu_sel_t'($urandom), 1'($urandom));

    for (int k = 0; k < NUM_OPS; k++) begin
      op_e op;
      op = op_e'(k);
      need(op_hits[k], op.name());
    end
    need(n_full_ripple, "full-width carry ripple");
    need(n_carry_out, "arithmetic carry-out");
    need(n_borrow, "borrow in subtraction");
    need(n_mode_switch, "arithmetic/logic switch");
    need(n_logic_switch, "logic output switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
