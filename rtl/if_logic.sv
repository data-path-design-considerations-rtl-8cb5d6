// if_logic: internal-forwarding detection for double internal forwarding.
//
// While instruction I3 is in Ifetch, its source addresses rs1/rs2 are compared
// with the destination of I2 (now in Exec, its result will sit in DST1) and of
// I1 (now in Mem Acc, its result will sit in DST2). The four results
//   DST2_to_busA: rs1(I3) = rd(I1)    DST2_to_busB: rs2(I3) = rd(I1)
//   DST1_to_busA: rs1(I3) = rd(I2)    DST1_to_busB: rs2(I3) = rd(I2)
// are registered at the end of Ifetch and steer busA/busB during I3's Exec
// cycle, as in the document, where the comparison runs in parallel with the
// register decoding. A destination counts only when its instruction writes a
// register and the control unit asserts if_enable (the document's IF enabling
// signal). The comparison is on the 5-bit logical address, as in the document's
// comparator.
module if_logic
  import spur_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      hold,
  input  logic      if_enable,
  input  raddr_t    rs1,
  input  raddr_t    rs2,
  input  rd_entry_t rd_i2,   // instruction in Exec
  input  rd_entry_t rd_i1,   // instruction in Mem Acc
  output logic      dst1_to_busa,
  output logic      dst1_to_busb,
  output logic      dst2_to_busa,
  output logic      dst2_to_busb
);
  logic m1a, m1b, m2a, m2b;

  addr_cmp u_c1a (.a(rs1), .b(rd_i2.addr), .en(if_enable && rd_i2.valid), .match(m1a));
  addr_cmp u_c1b (.a(rs2), .b(rd_i2.addr), .en(if_enable && rd_i2.valid), .match(m1b));
  addr_cmp u_c2a (.a(rs1), .b(rd_i1.addr), .en(if_enable && rd_i1.valid), .match(m2a));
  addr_cmp u_c2b (.a(rs2), .b(rd_i1.addr), .en(if_enable && rd_i1.valid), .match(m2b));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst1_to_busa <= 1'b0;
      dst1_to_busb <= 1'b0;
      dst2_to_busa <= 1'b0;
      dst2_to_busb <= 1'b0;
    end else if (!hold) begin
      dst1_to_busa <= m1a;
      dst1_to_busb <= m1b;
      dst2_to_busa <= m2a;
      dst2_to_busb <= m2b;
    end
  end
endmodule
