// upper_dp: the upper data path (instruction addresses and window pointers).
//
// IfetPC, ExecPC and MemPC hold the word addresses of the instructions in the
// Ifetch, Exec and Mem Acc stages and advance together once per pipeline
// cycle. The adder forms the target ExecPC + disp of the compare-and-branch
// instruction in Exec while the ALU evaluates its condition. The next fetch
// address is, in priority order, TrapPC on a trap, the adder's target on a
// taken branch, CallPC on a jump or call, else IfetPC + 1; the instruction
// already fetched behind a branch is not cancelled. CallPC, TrapPC and SWP are
// loaded from busS; CWP is loaded from busS or stepped by call (down) and
// return (up), matching the window pairing of window_decoder. The document
// lists these registers and what they hold; the priorities, the
// not-cancelled slot and the load ports are this design's choices.
module upper_dp
  import spur_pkg::*;
#(
  parameter int ADDR_W = 30
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hold,
  input  logic [ADDR_W-1:0] reset_pc,
  input  logic              branch,     // compare-and-branch in Exec
  input  logic              taken,      // its condition, from branch_cond
  input  logic [ADDR_W-1:0] disp,       // branch displacement from busI
  input  logic              jump,       // go to CallPC
  input  logic              trap,       // go to TrapPC
  input  logic              call,       // step CWP to the child window
  input  logic              ret,        // step CWP back to the parent window
  input  logic [ADDR_W-1:0] bus_s,
  input  logic              callpc_we,
  input  logic              trappc_we,
  input  logic              swp_we,
  input  logic              cwp_we,
  output logic [ADDR_W-1:0] ifet_pc,
  output logic [ADDR_W-1:0] exec_pc,
  output logic [ADDR_W-1:0] mem_pc,
  output logic [ADDR_W-1:0] call_pc,
  output logic [ADDR_W-1:0] trap_pc,
  output logic [ADDR_W-1:0] swp,
  output cwp_t              cwp,
  output logic [ADDR_W-1:0] target
);
  logic [ADDR_W-1:0] next_pc;

  assign target = exec_pc + disp;

  always_comb begin
    if (trap)                  next_pc = trap_pc;
    else if (branch && taken)  next_pc = target;
    else if (jump)             next_pc = call_pc;
    else                       next_pc = ifet_pc + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ifet_pc <= reset_pc;
      exec_pc <= '0;
      mem_pc  <= '0;
      call_pc <= '0;
      trap_pc <= '0;
      swp     <= '0;
      cwp     <= '0;
    end else if (!hold) begin
      ifet_pc <= next_pc;
      exec_pc <= ifet_pc;
      mem_pc  <= exec_pc;
      if (callpc_we) call_pc <= bus_s;
      if (trappc_we) trap_pc <= bus_s;
      if (swp_we)    swp     <= bus_s;
      if (cwp_we)    cwp     <= cwp_t'(bus_s);
      else if (call) cwp     <= cwp - 1'b1;
      else if (ret)  cwp     <= cwp + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(call && ret));
endmodule
