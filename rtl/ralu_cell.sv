// One bit of the reversible ALU, built only from reversible gates.
//
// Signal flow (names follow the slice's block diagram):
//   F  (Feynman)  : S0, B        -> g0, t  = B xor S0   (B or its complement)
//   DKG           : 0, A, t, Cin -> t2 = A, t3 = t, Cout = carry, t4 = sum
//                   (control input tied to 0: full-adder mode)
//   BME           : t2, t3, S1, S2 -> g1, g2, t5 = A.S2 xor S1,
//                                          t6 = A'.t xor S1 xor S2
//   Fr (Fredkin)  : S3, t5, t6   -> g3, g4, t8 = S3 ? t5 : t6
//   F  (Feynman)  : t4, 0        -> g7, t7 = t4      (fan-out copy of the sum)
//   Fr (Fredkin)  : S4, t8, t7   -> g5, g6, Result = S4 ? t8 : t7
//
// With S4 = 0 the slice is a full adder on A, B xor S0 and Cin; with S4 = 1
// it outputs one of the BME logic functions chosen by S3..S0. The carry
// output is the DKG's carry in both cases. The gate types, the wiring and
// the names t, t2..t8, g0..g7 are those of the diagram. Which DKG pin takes
// the constant 0 and which DKG outputs are the carry and the sum are this
// design's reading: it is the only assignment that makes the DKG an adder.
// The garbage outputs are brought out as g[7:0] (g[i] = gi).
// Purely combinational; the carry path is Cin -> DKG R -> Cout.
module ralu_cell
  import ralu_pkg::*;
(
  input  logic                       a,
  input  logic                       b,
  input  ralu_sel_t                  sel,
  input  logic                       cin,
  output logic                       result,
  output logic                       cout,
  output logic [GARBAGE_PER_BIT-1:0] g
);

  logic t, t2, t3, t4, t5, t6, t7, t8;

  feynman_gate u_fin (
    .a (sel.s0), .b (b),
    .p (g[0]),   .q (t)
  );

  dkg_gate u_dkg (
    .a (1'b0), .b (a), .c (t), .d (cin),
    .p (t2),   .q (t3), .r (cout), .s (t4)
  );

  bme_gate u_bme (
    .x (t2),   .y (t3),   .z (sel.s1), .t (sel.s2),
    .p (g[1]), .q (g[2]), .r (t5),     .s (t6)
  );

  fredkin_gate u_fr_logic (
    .a (sel.s3), .b (t5), .c (t6),
    .p (g[3]),   .q (g[4]), .r (t8)
  );

  feynman_gate u_fsum (
    .a (t4),   .b (1'b0),
    .p (g[7]), .q (t7)
  );

  fredkin_gate u_fr_out (
    .a (sel.s4), .b (t8), .c (t7),
    .p (g[5]),   .q (g[6]), .r (result)
  );

endmodule
