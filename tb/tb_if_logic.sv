// tb_if_logic: self-checking test of the internal-forwarding detector.
//
// Each clock the testbench applies random source addresses for the Ifetch
// instruction and random destination entries for the Exec and Mem Acc
// instructions, forcing matches often, with random if_enable and hold. It
// computes the four conditions itself (RS1/RS2 equal to the Exec destination
// for DST1, to the Mem Acc destination for DST2, each only if that entry is
// valid and forwarding is enabled) and compares them with the registered
// flags one time step after the rising edge; under hold the old flags must
// stay. The four conditions follow the document; the valid qualifier is
// this design's. A watchdog ends a hung run with a failure.
module tb_if_logic;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, hold = 0, if_enable;
  raddr_t rs1, rs2;
  rd_entry_t rd_i2, rd_i1;
  logic d1a, d1b, d2a, d2b;
  logic [3:0] exp, prev;

  if_logic dut (.clk, .rst_n, .hold, .if_enable, .rs1, .rs2, .rd_i2, .rd_i1,
                .dst1_to_busa(d1a), .dst1_to_busb(d1b), .dst2_to_busa(d2a), .dst2_to_busb(d2b));
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    if_enable = 0; rs1 = 0; rs2 = 0; rd_i1 = '0; rd_i2 = '0;
    @(negedge clk); rst_n = 1;
    prev = 4'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      rs1 = raddr_t'($urandom); rs2 = raddr_t'($urandom);
      rd_i2 = rd_entry_t'($urandom); rd_i1 = rd_entry_t'($urandom);
      if (n % 3 == 0) rd_i2.addr = rs1;
      if (n % 5 == 0) rd_i1.addr = rs2;
      if (n % 7 == 0) rd_i1.addr = rs1;
      if (n % 4 == 0) rd_i2.addr = rs2;
      if_enable = ($urandom % 8 != 0);
      hold = ($urandom % 10 == 0);
      exp[3] = if_enable && rd_i2.valid && rs1 == rd_i2.addr;
      exp[2] = if_enable && rd_i2.valid && rs2 == rd_i2.addr;
      exp[1] = if_enable && rd_i1.valid && rs1 == rd_i1.addr;
      exp[0] = if_enable && rd_i1.valid && rs2 == rd_i1.addr;
      if (hold) exp = prev;
      @(posedge clk); #1;
      checks++;
      if ({d1a, d1b, d2a, d2b} !== exp) begin failures++; $display("FAIL n=%0d got %b exp %b", n, {d1a, d1b, d2a, d2b}, exp); end
      prev = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
