// WIDTH-bit reversible ALU: WIDTH one-bit slices with a rippling carry.
//
// Every slice gets the same select lines S4..S0. Bit 0 takes the external
// carry-in; bit i+1 takes the carry-out of bit i, and the carry-out of the
// top bit is brought out. With S4 = 0 the result is the arithmetic sum
// A + (B xor {WIDTH{S0}}) + Cin, so S0 = 1 with Cin = 1 gives A - B; with
// S4 = 1 each bit independently takes the logic function selected by
// S3..S0 (see ralu_cell). The carry chain still ripples in logic mode, but
// the result does not depend on it then.
//
// Cascading full adder/subtractor slices is how the ALU is built; the
// 16-bit default is its main configuration (1 to 32 bits were also
// evaluated). Bringing out every slice's garbage lines, g[i] for bit i, is
// this design's choice. Purely combinational: the critical path is the
// WIDTH-stage carry chain from cin to cout and result[WIDTH-1].
module ralu
  import ralu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]                       a,
  input  logic [WIDTH-1:0]                       b,
  input  ralu_sel_t                              sel,
  input  logic                                   cin,
  output logic [WIDTH-1:0]                       result,
  output logic                                   cout,
  output logic [WIDTH-1:0][GARBAGE_PER_BIT-1:0]  g
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;
  assign cout     = carry[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    ralu_cell u_cell (
      .a      (a[i]),
      .b      (b[i]),
      .sel    (sel),
      .cin    (carry[i]),
      .result (result[i]),
      .cout   (carry[i+1]),
      .g      (g[i])
    );
  end

endmodule
