// spur_ldp: the SPUR CPU lower data path and its four-stage pipeline.
//
// One clock with hold low is one pipeline cycle (Ifetch, Exec, Mem Acc,
// Write); the document's four clock phases inside a cycle are folded into
// that one step. The control unit presents the decoded instruction in ctrl_i
// during its Ifetch cycle, and the window pointer on cwp.
//   Ifetch : RA/RB latch the source rows; the RD shift register takes the
//            destination; the IF logic compares the sources with the
//            destinations of the two older instructions.
//   Exec   : busA/busB come from the register file or, when forwarding, from
//            DST2 or DST1 (DST1 wins); BusBufB may take the immediate; a
//            functional unit drives busD, which DST1 captures; loads and
//            stores put the address on busS into MAR and a store puts busB
//            into MBR; branch conditions are evaluated.
//   Mem Acc: DST2 takes DST1, or busL for a load; a store drives busL from
//            MBR.
//   Write  : DST2 is written into the register file.
// A value is thus visible to the next two instructions by forwarding and to
// all later ones through the register file. An instruction that reads the
// destination of the load just ahead of it gets the load's address, not its
// data: the document leaves that sequence undefined. hold freezes every
// register and suppresses the register-file write.
module spur_ldp
  import spur_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  hold,
  input  ctrl_t ctrl_i,
  input  cwp_t  cwp,
  // memory
  output data_t mem_addr,
  output logic  mem_rd,
  output logic  mem_wr,
  output word_t mem_wdata,
  input  word_t mem_rdata,
  // to the upper data path
  output data_t bus_s,
  output logic  exec_branch,
  output logic  branch_taken,
  output word_t exec_imm,
  // observation
  output word_t bus_d,
  output word_t upsw,
  output word_t kpsw,
  output logic  fwd_dst1_a,
  output logic  fwd_dst1_b,
  output logic  fwd_dst2_a,
  output logic  fwd_dst2_b,
  output logic  wb_we
);
  ctrl_t     ctrl_x;          // instruction in Exec
  logic      mem_is_load;     // instruction in Mem Acc is a load
  rd_entry_t rd_exec, rd_mem, rd_wb;
  word_t     bl_a, bl_b, bus_a, bus_b, dst1, dst2, mbr, psw_r;
  logic      carry, equal, negative, overflow, taken;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_x      <= '0;
      mem_is_load <= 1'b0;
    end else if (!hold) begin
      ctrl_x      <= ctrl_i;
      mem_is_load <= ctrl_x.is_load;
    end
  end

  rd_shift u_rd (
    .clk, .rst_n, .hold,
    .in('{valid: ctrl_i.rd_we, addr: ctrl_i.rd, cwp: cwp}),
    .exec_q(rd_exec), .mem_q(rd_mem), .wb_q(rd_wb)
  );

  regfile u_rf (
    .clk, .rst_n, .hold,
    .rs1(ctrl_i.rs1), .rs2(ctrl_i.rs2), .cwp(cwp),
    .we(rd_wb.valid), .wr_addr(rd_wb.addr), .wr_cwp(rd_wb.cwp), .wr_data(dst2),
    .bitline_a(bl_a), .bitline_b(bl_b)
  );
  assign wb_we = rd_wb.valid && !hold;

  if_logic u_if (
    .clk, .rst_n, .hold,
    .if_enable(ctrl_i.if_enable), .rs1(ctrl_i.rs1), .rs2(ctrl_i.rs2),
    .rd_i2(rd_exec), .rd_i1(rd_mem),
    .dst1_to_busa(fwd_dst1_a), .dst1_to_busb(fwd_dst1_b),
    .dst2_to_busa(fwd_dst2_a), .dst2_to_busb(fwd_dst2_b)
  );

  fwd_mux u_fwd_a (.bitline(bl_a), .dst2(dst2), .dst1(dst1),
                   .dst2_sel(fwd_dst2_a), .dst1_sel(fwd_dst1_a), .bus(bus_a));
  fwd_mux u_fwd_b (.bitline(bl_b), .dst2(dst2), .dst1(dst1),
                   .dst2_sel(fwd_dst2_b), .dst1_sel(fwd_dst1_b), .bus(bus_b));

  exec_unit u_ex (
    .bus_a, .bus_b, .imm(ctrl_x.imm), .use_imm(ctrl_x.use_imm),
    .fu(ctrl_x.fu), .alu_op(ctrl_x.alu_op), .shift_op(ctrl_x.shift_op),
    .shamt(ctrl_x.shamt), .byte_sel(ctrl_x.byte_sel), .psw(psw_r),
    .bus_d, .bus_s, .carry, .equal, .negative, .overflow
  );

  branch_cond u_bc (.cond(ctrl_x.cond), .equal, .carry, .negative, .overflow, .taken);
  assign exec_branch  = ctrl_x.is_branch;
  assign branch_taken = ctrl_x.is_branch && taken;
  assign exec_imm     = ctrl_x.imm;

  dst_mbr u_dst (
    .clk, .rst_n, .hold, .bus_d, .mem_is_load, .bus_l_in(mem_rdata),
    .exec_is_store(ctrl_x.is_store), .bus_b, .dst1, .dst2, .mbr
  );

  psw_regs u_psw (
    .clk, .rst_n, .hold, .we(ctrl_x.psw_we), .sel(ctrl_x.psw_sel), .wdata(bus_d),
    .rd_sel(ctrl_x.psw_sel), .rdata(psw_r), .upsw, .kpsw
  );

  bus_interface u_bus (
    .clk, .rst_n, .hold, .exec_is_load(ctrl_x.is_load), .exec_is_store(ctrl_x.is_store),
    .bus_s, .mbr, .mar(mem_addr), .mem_rd, .mem_wr, .mem_wdata
  );

  assert property (@(posedge clk) disable iff (!rst_n) !(ctrl_i.is_load && ctrl_i.is_store));
endmodule
