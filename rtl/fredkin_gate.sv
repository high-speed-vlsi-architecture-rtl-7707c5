// Fredkin gate: the 3x3 reversible controlled swap.
//
//   P = A
//   Q = A'B + AC
//   R = A'C + AB
//
// When the control A is 0, B and C pass straight through to Q and R; when
// A is 1 they are swapped. R is therefore a 2:1 multiplexer, A ? B : C,
// which is how the ALU slice uses it. The equations are the standard
// definition of the gate. Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (~a & c) | (a & b);

endmodule
