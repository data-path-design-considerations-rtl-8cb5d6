// tb_rd_shift: self-checking test of the RD shift register.
//
// Checks that reset clears the valid bits, then pushes a random destination
// entry (valid, address, window) each clock with random hold. A queue in the
// testbench records the entries that were taken, and the exec, mem and wb
// outputs must equal the last three, one time step after each rising edge.
// A shift register carrying the destination to the Write stage follows the
// document; the valid bit and window in each entry are this design's. A
// watchdog ends a hung run with a failure.
module tb_rd_shift;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, hold = 0;
  rd_entry_t in, exec_q, mem_q, wb_q;
  rd_entry_t hist[$];

  rd_shift dut (.clk, .rst_n, .hold, .in, .exec_q, .mem_q, .wb_q);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (exec_q.valid || mem_q.valid || wb_q.valid) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      hold = ($urandom % 4 == 0);
      in = rd_entry_t'($urandom);
      if (!hold) hist.push_front(in);
      @(posedge clk); #1;
      if (hist.size() >= 3) begin
        checks++;
        if (exec_q != hist[0] || mem_q != hist[1] || wb_q != hist[2]) begin
          failures++; $display("FAIL at %0d", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
