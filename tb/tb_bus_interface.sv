// tb_bus_interface: self-checking test of MAR and the memory strobes.
//
// Each clock the testbench draws a random Exec-stage instruction kind (load,
// store or other), a random busS address, MBR value and hold. A model in the
// testbench predicts the registers after the edge: MAR takes busS only for a
// load or store, mem_rd/mem_wr repeat the load/store flags one cycle later
// (the Mem Acc cycle), mem_wdata always shows MBR, and hold keeps all of
// them. Checked one time step after each rising edge. MAR <- busS in Exec
// follows the document; the strobe interface is this design's. A watchdog
// ends a hung run with a failure.
module tb_bus_interface;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, hold = 0, ld = 0, st = 0, mem_rd, mem_wr;
  data_t bus_s, mar, emar;
  word_t mbr, wdata;
  logic erd, ewr;

  bus_interface dut (.clk, .rst_n, .hold, .exec_is_load(ld), .exec_is_store(st), .bus_s, .mbr,
                     .mar, .mem_rd, .mem_wr, .mem_wdata(wdata));
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_s = 0; mbr = 0; emar = 0; erd = 0; ewr = 0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      ld = ($urandom % 3 == 0); st = !ld && ($urandom % 2 == 0); hold = ($urandom % 6 == 0);
      bus_s = $urandom; mbr = {8'($urandom), 32'($urandom)};
      if (!hold) begin erd = ld; ewr = st; if (ld || st) emar = bus_s; end
      @(posedge clk); #1;
      checks++;
      if (mar !== emar || mem_rd !== erd || mem_wr !== ewr || wdata !== mbr) begin failures++; $display("FAIL n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
