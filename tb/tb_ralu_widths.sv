// Width sweep of the ralu top: 1, 2, 4, 8, 16 and 32 bits, the word sizes
// the ALU is characterised at. Each width gets its own instance and runs
// every setting of S4..S0 and Cin with random operands plus a full-width
// carry ripple, checked against the word-level reference model.
module tb_ralu_widths;

  import ralu_pkg::*;
  import ralu_ref_pkg::*;

  localparam int unsigned NW = 6;
  localparam int unsigned WIDTHS [NW] = '{1, 2, 4, 8, 16, 32};

  int checks [NW];
  int failures [NW];
  bit done [NW];

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int unsigned W = WIDTHS[w];

    logic [W-1:0]                      a, b, result;
    ralu_sel_t                         sel;
    logic                              cin, cout;
    logic [W-1:0][GARBAGE_PER_BIT-1:0] g;

    ralu #(.WIDTH(W)) dut (.a, .b, .sel, .cin, .result, .cout, .g);

    task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb,
                         input int s);
      longint unsigned exp_res;
      logic            exp_cout;
      a = va; b = vb; sel = ralu_sel_t'(s[5:1]); cin = s[0];
      #1;
      expect_out(W, sel, cin, 64'(a), 64'(b), exp_res, exp_cout);
      checks[w]++;
      if (result !== W'(exp_res) || cout !== exp_cout) begin
        failures[w]++;
        $display("FAIL W=%0d a=%h b=%h sel=%b cin=%b: result=%h cout=%b, expected %h %b",
                 W, a, b, sel, cin, result, cout, W'(exp_res), exp_cout);
      end
    endtask

    initial begin
      for (int s = 0; s < 64; s++) begin
        apply('1, '0, s);
        apply('0, '1, s);
        for (int k = 0; k < 100; k++)
          apply(W'({$urandom, $urandom}), W'({$urandom, $urandom}), s);
      end
      done[w] = 1'b1;
    end
  end

  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum() + 1);
    $finish;
  end

  initial begin
    wait (done.and());
    for (int w = 0; w < NW; w++)
      $display("WIDTH %2d: checks=%0d failures=%0d", WIDTHS[w], checks[w], failures[w]);
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum());
    $finish;
  end

endmodule
