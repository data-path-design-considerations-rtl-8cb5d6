// spur_cpu: SPUR CPU data paths around the four-phase clock.
//
// Puts together what the chip's block diagram shows outside the control
// unit: the four-phase clock generator, the instruction buffer, the upper data
// path (instruction addresses, CWP, SWP) and the lower data path (register
// file, forwarding, functional units, DST1/DST2/MBR, PSWs, bus interface).
// Everything runs on the master clock clk; the pipeline advances once per
// four-phase cycle, on the generator's cycle_end strobe, unless stall (a
// pipeline suspension) is high. The control unit and the instruction unit
// controller are not part of this RTL: the decoded instruction for the Ifetch
// stage arrives on ctrl_i, the upper-data-path commands on the pc_* inputs,
// and the instruction word read from the buffer leaves on ib_instr. Memory is
// reached through MAR/busS (mem_addr) and busL (mem_wdata / mem_rdata); a
// memory access completes within its Mem Acc cycle, as in the document's
// load example with no cache miss.
module spur_cpu
  import spur_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stall,
  // four-phase clock
  output logic        phi1,
  output logic        phi2,
  output logic        phi3,
  output logic        phi4,
  output logic        cycle_end,
  // decoded instruction in Ifetch, from the control unit
  input  ctrl_t       ctrl_i,
  // upper data path commands for the instruction in Exec
  input  logic [29:0] reset_pc,
  input  logic        pc_jump,
  input  logic        pc_trap,
  input  logic        pc_call,
  input  logic        pc_ret,
  input  logic        pc_callpc_we,
  input  logic        pc_trappc_we,
  input  logic        pc_swp_we,
  input  logic        pc_cwp_we,
  output logic [29:0] ifet_pc,
  output logic [29:0] exec_pc,
  output logic [29:0] mem_pc,
  output logic [29:0] swp,
  output logic [29:0] call_pc,
  output logic [29:0] trap_pc,
  output logic [29:0] branch_target,
  output cwp_t        cwp,
  output logic        branch_taken,
  // instruction buffer
  input  logic        ib_inv,
  input  logic        ib_fill_en,
  input  logic [29:0] ib_fill_addr,
  input  logic [31:0] ib_fill_data,
  output logic        ib_hit,
  output logic [31:0] ib_instr,
  // memory
  output data_t       mem_addr,
  output logic        mem_rd,
  output logic        mem_wr,
  output word_t       mem_wdata,
  input  word_t       mem_rdata,
  // observation
  output word_t       bus_d,
  output word_t       upsw,
  output word_t       kpsw,
  output logic [3:0]  fwd,       // {DST1->A, DST1->B, DST2->A, DST2->B} this Exec cycle
  output logic        rf_write
);
  logic  hold;
  logic  exec_branch;
  data_t bus_s;
  word_t exec_imm;

  clkgen4 u_clk (.clk, .rst_n, .phi1, .phi2, .phi3, .phi4, .cycle_end);

  assign hold = stall || !cycle_end;

  instr_buffer u_ib (
    .clk, .rst_n, .inv_all(ib_inv), .fetch_addr(ifet_pc), .hit(ib_hit), .instr(ib_instr),
    .fill_en(ib_fill_en), .fill_addr(ib_fill_addr), .fill_data(ib_fill_data)
  );

  upper_dp u_udp (
    .clk, .rst_n, .hold, .reset_pc,
    .branch(exec_branch), .taken(branch_taken), .disp(exec_imm[29:0]),
    .jump(pc_jump), .trap(pc_trap), .call(pc_call), .ret(pc_ret),
    .bus_s(bus_s[29:0]), .callpc_we(pc_callpc_we), .trappc_we(pc_trappc_we),
    .swp_we(pc_swp_we), .cwp_we(pc_cwp_we),
    .ifet_pc, .exec_pc, .mem_pc, .call_pc, .trap_pc, .swp, .cwp, .target(branch_target)
  );

  spur_ldp u_ldp (
    .clk, .rst_n, .hold, .ctrl_i, .cwp,
    .mem_addr, .mem_rd, .mem_wr, .mem_wdata, .mem_rdata,
    .bus_s, .exec_branch, .branch_taken, .exec_imm,
    .bus_d, .upsw, .kpsw,
    .fwd_dst1_a(fwd[3]), .fwd_dst1_b(fwd[2]), .fwd_dst2_a(fwd[1]), .fwd_dst2_b(fwd[0]),
    .wb_we(rf_write)
  );
endmodule
