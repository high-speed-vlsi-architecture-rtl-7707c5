// Feynman gate: the 2x2 reversible controlled-NOT.
//
// P passes the control input A through and Q is A xor B, so the gate is its
// own inverse. With B tied to 0 it copies A onto two lines, which is how a
// reversible circuit fans a signal out; with A as a control it inverts B
// on demand. The equations are the standard definition of the gate; the
// ALU slice uses it for both purposes. Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a;
  assign q = a ^ b;

endmodule
