// exec_unit: the Exec-stage half of the lower data path.
//
// BusBufA takes busA; BusBufB takes either busB or the immediate from busI.
// TAGA keeps the tag of busA2. The ALU, the shifter and the byte
// extractor/inserter all see busA2/busB2, and the one named by fu drives busD
// (in the chip busD is precharged and discharged by the selected unit's
// driver; here it is a multiplexer). ALU and shifter results carry TAGA as
// their tag, as the document's register-transfer table shows. The ALU result
// also goes out on busS as the memory address of loads and stores. FU_PSW
// puts the selected processor status word on busD; that path and the other
// encodings are this design's. Combinational.
module exec_unit
  import spur_pkg::*;
(
  input  word_t      bus_a,
  input  word_t      bus_b,
  input  word_t      imm,        // busI
  input  logic       use_imm,
  input  fu_e        fu,
  input  alu_op_e    alu_op,
  input  shift_op_e  shift_op,
  input  logic [1:0] shamt,
  input  logic [2:0] byte_sel,
  input  word_t      psw,
  output word_t      bus_d,
  output data_t      bus_s,
  output logic       carry,
  output logic       equal,
  output logic       negative,
  output logic       overflow
);
  word_t bus_a2, bus_b2, ext_w, ins_w;
  tag_t  taga;
  data_t alu_y, sh_y;

  // bus buffers and tag latch
  assign bus_a2 = bus_a;
  assign bus_b2 = use_imm ? imm : bus_b;
  assign taga   = bus_a2[WORD_W-1 -: TAG_W];

  alu u_alu (
    .a(bus_a2[DATA_W-1:0]), .b(bus_b2[DATA_W-1:0]), .op(alu_op),
    .y(alu_y), .carry(carry), .equal(equal), .negative(negative), .overflow(overflow)
  );

  shifter u_sh (.d(bus_a2[DATA_W-1:0]), .op(shift_op), .amount(shamt), .y(sh_y));

  byte_ext_ins u_bei (.src(bus_a2), .ins(bus_b2), .byte_sel(byte_sel),
                      .extracted(ext_w), .inserted(ins_w));

  always_comb begin
    unique case (fu)
      FU_ALU:   bus_d = {taga, alu_y};
      FU_SHIFT: bus_d = {taga, sh_y};
      FU_BEXT:  bus_d = ext_w;
      FU_BINS:  bus_d = ins_w;
      FU_PSW:   bus_d = psw;
      default:  bus_d = {taga, alu_y};
    endcase
  end

  assign bus_s = alu_y;
endmodule
