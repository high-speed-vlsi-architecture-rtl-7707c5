// Reference model of the reversible ALU, for the testbenches only.
//
// It states what the ALU computes at word level, without any of the
// reversible gates: the operation class selected by S4..S0 and Cin, and the
// expected result and carry-out for operands of up to 64 bits. The
// testbenches compare the gate-level design against it.
package ralu_ref_pkg;

  import ralu_pkg::*;

  typedef enum int {
    OP_ADD,        // S4=0 S0=0 Cin=0 : A + B
    OP_ADD_INC,    // S4=0 S0=0 Cin=1 : A + B + 1
    OP_SUB,        // S4=0 S0=1 Cin=1 : A - B
    OP_SUB_DEC,    // S4=0 S0=1 Cin=0 : A - B - 1
    OP_ZERO,       // S4=1 S3=1 S2=0 S1=0 : 0
    OP_ONES,       // S4=1 S3=1 S2=0 S1=1 : all ones
    OP_PASS_A,     // S4=1 S3=1 S2=1 S1=0 : A
    OP_NOT_A,      // S4=1 S3=1 S2=1 S1=1 : not A
    OP_NOTA_AND_B, // S4=1 S3=0 S0=0, S1 = S2 : (not A) and B
    OP_A_OR_NOTB,  // S4=1 S3=0 S0=0, S1 /= S2 : A or (not B)
    OP_NOR,        // S4=1 S3=0 S0=1, S1 = S2 : not (A or B)
    OP_OR          // S4=1 S3=0 S0=1, S1 /= S2 : A or B
  } op_e;

  localparam int NUM_OPS = 12;

  function automatic op_e classify(ralu_sel_t sel, logic cin);
    if (!sel.s4) begin
      if (!sel.s0) return cin ? OP_ADD_INC : OP_ADD;
      else         return cin ? OP_SUB : OP_SUB_DEC;
    end
    if (sel.s3) begin
      case ({sel.s2, sel.s1})
        2'b00:   return OP_ZERO;
        2'b01:   return OP_ONES;
        2'b10:   return OP_PASS_A;
        default: return OP_NOT_A;
      endcase
    end
    if (!sel.s0) return (sel.s1 == sel.s2) ? OP_NOTA_AND_B : OP_A_OR_NOTB;
    else         return (sel.s1 == sel.s2) ? OP_NOR : OP_OR;
  endfunction

  // Expected result and carry-out of a W-bit ALU (W <= 64).
  function automatic void expect_out(int unsigned w, ralu_sel_t sel, logic cin,
                                     longint unsigned a, longint unsigned b,
                                     output longint unsigned res,
                                     output logic cout);
    longint unsigned mask, bb, lo, r;
    logic            c;
    mask = (w >= 64) ? '1 : ((64'd1 << w) - 1);
    a  &= mask;
    b  &= mask;
    bb = sel.s0 ? (~b & mask) : b;
    // The carry always comes from the adder, whatever the result shows.
    // Split the sum so that a 64-bit operand does not overflow.
    lo = (a & 64'hFFFF_FFFF) + (bb & 64'hFFFF_FFFF) + 64'(cin);
    r  = ((a >> 32) + (bb >> 32) + (lo >> 32));
    if (w > 32) begin
      c = (w == 64) ? r[32] : r[w-32];
    end else begin
      c = lo[w];
    end
    case (classify(sel, cin))
      OP_ADD, OP_ADD_INC, OP_SUB, OP_SUB_DEC:
        res = ((r << 32) | (lo & 64'hFFFF_FFFF)) & mask;
      OP_ZERO:       res = '0;
      OP_ONES:       res = mask;
      OP_PASS_A:     res = a;
      OP_NOT_A:      res = ~a & mask;
      OP_NOTA_AND_B: res = ~a & b;
      OP_A_OR_NOTB:  res = (a | ~b) & mask;
      OP_NOR:        res = ~(a | b) & mask;
      default:       res = a | b;
    endcase
    cout = c;
  endfunction

endpackage
