// tb_dst_mbr: self-checking test of DST1, DST2 and MBR.
//
// Each clock the testbench applies a random busD value, busL value, busB
// value, load and store flags and hold, and keeps its own copy of the three
// registers: DST1 takes busD, DST2 takes busL when the Mem Acc instruction
// is a load and DST1 otherwise, MBR takes busB for a store in Exec, and hold
// keeps all three. Outputs are compared one time step after each rising
// edge. These transfers follow the document's register-transfer tables for
// register, load and store instructions; loading DST1 on every cycle is this
// design's. A watchdog ends a hung run with a failure.
module tb_dst_mbr;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, hold = 0, mem_is_load = 0, exec_is_store = 0;
  word_t bus_d, bus_l_in, bus_b, dst1, dst2, mbr;
  word_t r1, r2, rm;

  dst_mbr dut (.clk, .rst_n, .hold, .bus_d, .mem_is_load, .bus_l_in, .exec_is_store, .bus_b, .dst1, .dst2, .mbr);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_d = '0; bus_l_in = '0; bus_b = '0;
    @(posedge clk); #1;
    checks++;
    if (dst1 != 0 || dst2 != 0 || mbr != 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1; r1 = 0; r2 = 0; rm = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      bus_d = {8'($urandom), 32'($urandom)};
      bus_l_in = {8'($urandom), 32'($urandom)};
      bus_b = {8'($urandom), 32'($urandom)};
      mem_is_load = $urandom % 2; exec_is_store = $urandom % 2; hold = ($urandom % 6 == 0);
      if (!hold) begin
        r2 = mem_is_load ? bus_l_in : r1;
        r1 = bus_d;
        if (exec_is_store) rm = bus_b;
      end
      @(posedge clk); #1;
      checks++;
      if (dst1 !== r1 || dst2 !== r2 || mbr !== rm) begin failures++; $display("FAIL n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
