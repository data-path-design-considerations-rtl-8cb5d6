// tb_upper_dp: directed test of the upper data path.
//
// Starting from reset it steps the PC pipeline and checks, cycle by cycle:
// IfetPC -> ExecPC -> MemPC with sequential fetch, loading CallPC and TrapPC
// from busS, a taken branch going to ExecPC + displacement, an untaken one
// going on sequentially, a jump to CallPC, a trap taking priority over a
// jump, hold freezing the PCs, CWP going down on call and up on return, and
// SWP and CWP loads from busS. Commands are applied at the falling edge and
// results read one time step after the rising edge. The registers and their
// roles follow the document; the priorities and the CWP direction are this
// design's. A watchdog ends a hung run with a failure.
module tb_upper_dp;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, hold = 0;
  logic branch = 0, taken = 0, jump = 0, trap = 0, call = 0, ret = 0;
  logic callpc_we = 0, trappc_we = 0, swp_we = 0, cwp_we = 0;
  logic [29:0] disp = 0, bus_s = 0;
  logic [29:0] ifet_pc, exec_pc, mem_pc, call_pc, trap_pc, swp, target;
  cwp_t cwp;

  upper_dp dut (.clk, .rst_n, .hold, .reset_pc(30'h100), .branch, .taken, .disp, .jump, .trap, .call, .ret,
                .bus_s, .callpc_we, .trappc_we, .swp_we, .cwp_we,
                .ifet_pc, .exec_pc, .mem_pc, .call_pc, .trap_pc, .swp, .cwp, .target);
  always #5 clk = ~clk;

  task automatic chk(string what, logic [29:0] got, logic [29:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic step;
    @(posedge clk); #1;
    @(negedge clk);
    {branch, taken, jump, trap, call, ret, callpc_we, trappc_we, swp_we, cwp_we, hold} = '0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    chk("reset pc", ifet_pc, 30'h100);
    step; step;
    chk("seq ifet", ifet_pc, 30'h102);
    chk("seq exec", exec_pc, 30'h101);
    chk("seq mem",  mem_pc,  30'h100);
    // load CallPC and TrapPC
    bus_s = 30'h2000; callpc_we = 1; step;
    bus_s = 30'h3000; trappc_we = 1; step;
    chk("callpc", call_pc, 30'h2000);
    chk("trappc", trap_pc, 30'h3000);
    // taken branch: ExecPC = 0x103 now
    chk("exec before branch", exec_pc, 30'h103);
    branch = 1; taken = 1; disp = 30'h40; #1;
    chk("target", target, 30'h143);
    step;
    chk("taken", ifet_pc, 30'h143);
    branch = 1; taken = 0; step;
    chk("not taken", ifet_pc, 30'h144);
    jump = 1; step;
    chk("jump", ifet_pc, 30'h2000);
    trap = 1; jump = 1; step;
    chk("trap priority", ifet_pc, 30'h3000);
    hold = 1; step;
    chk("hold", ifet_pc, 30'h3000);
    // windows
    call = 1; step;
    chk("call", 30'(cwp), 30'd7);
    ret = 1; step; ret = 1; step;
    chk("ret", 30'(cwp), 30'd1);
    bus_s = 30'd5; cwp_we = 1; step;
    chk("cwp load", 30'(cwp), 30'd5);
    bus_s = 30'h1234; swp_we = 1; step;
    chk("swp", swp, 30'h1234);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
