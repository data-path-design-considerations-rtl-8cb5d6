// alu: the 32-bit ALU of the lower data path.
//
// Three sections, as in the document. The input section complements B for
// a subtract and forms per-bit generate g = A & B' and propagate p = A ^ B';
// AND, XOR and OR come straight from it (g, p and g | p with B uncomplemented).
// The carry-propagation section is four cascaded 8-bit carry-lookahead blocks
// with the subtract flag as carry-in. The sum section forms p ^ carry. Equal
// is the AND of all propagate bits, which with B complemented means A == B.
// Besides the result the ALU reports carry-out, sign and signed overflow for
// the branch-condition logic; those two extra flags are this design's choice.
// Combinational: one pass stands for the document's phi2-phi4 evaluation.
module alu
  import spur_pkg::*;
(
  input  data_t   a,
  input  data_t   b,
  input  alu_op_e op,
  output data_t   y,
  output logic    carry,
  output logic    equal,
  output logic    negative,
  output logic    overflow
);
  logic  sub;
  data_t bx, g, p, c, pp, gg;
  logic [4:0] blk_c;

  // input section
  assign sub = (op == ALU_SUB);
  assign bx  = sub ? ~b : b;
  assign g   = a & bx;
  assign p   = a ^ bx;

  // carry propagation: four 8-bit blocks
  assign blk_c[0] = sub;
  for (genvar k = 0; k < 4; k++) begin : g_blk
    cla8 u_cla (
      .p   (p[8*k +: 8]),
      .g   (g[8*k +: 8]),
      .cin (blk_c[k]),
      .pp  (pp[8*k +: 8]),
      .gg  (gg[8*k +: 8]),
      .c   (c[8*k +: 8]),
      .cout(blk_c[k+1])
    );
  end

  // sum / output section
  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB: y = p ^ c;
      ALU_AND:          y = g;
      ALU_OR:           y = g | p;
      ALU_XOR:          y = p;
      default:          y = p ^ c;
    endcase
  end

  assign carry    = blk_c[4];
  assign equal    = &p;
  assign negative = y[DATA_W-1];
  assign overflow = (a[DATA_W-1] == bx[DATA_W-1]) && ((p[DATA_W-1] ^ c[DATA_W-1]) != a[DATA_W-1]);
endmodule
