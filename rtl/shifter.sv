// shifter: the small shifter of the lower data path.
//
// Logical left shift by 1, 2 or 3 bits, logical right shift by 1 and
// arithmetic right shift by 1, the operations the document lists; longer
// shifts are made by repeating these. It works on the 32-bit data word; the
// tag is handled outside (TAGA). A left-shift amount of 0 passes the data
// unchanged, and the amount is ignored for right shifts (this design's
// choices). Combinational.
module shifter
  import spur_pkg::*;
(
  input  data_t     d,
  input  shift_op_e op,
  input  logic [1:0] amount,
  output data_t     y
);
  always_comb begin
    unique case (op)
      SH_SLL:  y = d << amount;
      SH_SRL:  y = {1'b0, d[DATA_W-1:1]};
      SH_SRA:  y = {d[DATA_W-1], d[DATA_W-1:1]};
      default: y = d;
    endcase
  end
endmodule
