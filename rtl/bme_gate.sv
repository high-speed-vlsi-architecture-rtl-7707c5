// BME gate: a 4x4 reversible gate with inputs X, Y, Z, T.
//
//   P = X
//   Q = XY xor Z
//   R = XT xor Z
//   S = X'Y xor Z xor T
//
// In the ALU slice Z and T are select lines, so R and S become programmable
// one- and two-input logic functions of X and Y. P follows the gate's block
// diagram (P = X); one prose statement of the gate gives P = X' instead,
// which would change only this garbage output. As defined, R and S coincide
// whenever X = 1, so the mapping is not one-to-one over all 16 inputs; the
// equations are kept as the gate is defined. Purely combinational.
module bme_gate (
  input  logic x,
  input  logic y,
  input  logic z,
  input  logic t,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  assign p = x;
  assign q = (x & y) ^ z;
  assign r = (x & t) ^ z;
  assign s = (~x & y) ^ z ^ t;

endmodule
