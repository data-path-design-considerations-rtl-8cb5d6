// branch_cond: compare-and-branch condition evaluation.
//
// Uses the ALU flags of a subtract A - B (equal, carry, sign, overflow) to
// decide a condition while the upper data path's adder forms the branch
// target, as the document describes. The condition set (signed and unsigned
// orderings, equal, not equal, always, never) is this design's: the document
// refers to a separate instruction-set description for the list.
// Combinational.
module branch_cond
  import spur_pkg::*;
(
  input  cond_e cond,
  input  logic  equal,
  input  logic  carry,      // carry out of A + ~B + 1: set when A >= B unsigned
  input  logic  negative,
  input  logic  overflow,
  output logic  taken
);
  logic lt, ltu;
  assign lt  = negative ^ overflow;
  assign ltu = !carry;

  always_comb begin
    unique case (cond)
      C_NEVER:  taken = 1'b0;
      C_EQ:     taken = equal;
      C_NE:     taken = !equal;
      C_LT:     taken = lt;
      C_LE:     taken = lt || equal;
      C_GT:     taken = !lt && !equal;
      C_GE:     taken = !lt;
      C_LTU:    taken = ltu;
      C_LEU:    taken = ltu || equal;
      C_GTU:    taken = !ltu && !equal;
      C_GEU:    taken = !ltu;
      C_ALWAYS: taken = 1'b1;
      default:  taken = 1'b0;
    endcase
  end
endmodule
