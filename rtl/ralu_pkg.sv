// Shared types of the reversible ALU.
//
// ralu_sel_t bundles the five select lines S4..S0 of one ALU slice. S0 goes
// to the input Feynman gate (conditional inversion of B), S1 and S2 to the
// BME gate (logic function), S3 and S4 to the two Fredkin gates (output
// steering). The select lines are named as in the original block diagram;
// packing them into a struct is a choice of this implementation.
package ralu_pkg;

  typedef struct packed {
    logic s4;  // final Fredkin control: 1 = logic path, 0 = arithmetic path
    logic s3;  // first Fredkin control: 1 = BME output R, 0 = BME output S
    logic s2;  // BME input T
    logic s1;  // BME input Z
    logic s0;  // input Feynman control: 1 = invert B
  } ralu_sel_t;

  // Garbage outputs g0..g7 of one slice.
  localparam int unsigned GARBAGE_PER_BIT = 8;

endpackage
