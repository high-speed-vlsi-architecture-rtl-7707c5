// DKG gate: a 4x4 reversible gate that is a full adder or a full subtractor.
//
//   P = B
//   Q = A'C + AD'
//   R = (A xor B)(C xor D) xor CD
//   S = B xor C xor D
//
// With A = 0, S is the sum of B, C and D and R their majority (the carry);
// with A = 1, S is the difference and R the borrow of a full subtractor.
// The four equations are those the gate is defined by; the mapping from
// input vector to output vector is one-to-one. Purely combinational.
module dkg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  assign p = b;
  assign q = (~a & c) | (a & ~d);
  assign r = ((a ^ b) & (c ^ d)) ^ (c & d);
  assign s = b ^ c ^ d;

endmodule
