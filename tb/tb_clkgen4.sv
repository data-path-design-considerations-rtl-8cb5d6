// tb_clkgen4: self-checking test of the four-phase clock generator.
//
// Runs the generator from a 5 ns master clock at its default sizes and
// measures twenty cycles tick by tick: no two phases high at once, each phase
// high for 25 ns, a 10 ns gap with no phase high after each, the phases in
// the order phi1..phi4, one cycle_end per cycle, and 140 ns between rising
// edges of phi1. The first cycle after reset is one master clock shorter
// and is not timed. The phase, gap and cycle times are the document's
// numbers; the 5 ns master clock is this design's. A watchdog ends a hung
// run with a failure.
module tb_clkgen4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic phi1, phi2, phi3, phi4, cycle_end;
  int hi [4];
  int gap, ends, ticks;
  logic [3:0] ph, last_ph;
  int order [$];
  int periods = 0, bad_period = 0;
  realtime t_prev = -1;

  always @(posedge phi1) begin
    if (t_prev >= 0) begin
      periods++;
      if (periods > 1)
        if ($realtime - t_prev != 140.0) bad_period++;
    end
    t_prev = $realtime;
  end

  clkgen4 dut (.clk, .rst_n, .phi1, .phi2, .phi3, .phi4, .cycle_end);
  always #2.5 clk = ~clk;   // 5 ns master clock

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    #12 rst_n = 1;
    // skip to a clean cycle start
    @(posedge phi1);
    cyc = 0;
    repeat (20) begin
      // measure one cycle tick by tick
      foreach (hi[i]) hi[i] = 0;
      gap = 0; ends = 0; order.delete(); last_ph = 4'b0001;
      order.push_back(0);
      for (int t = 0; t < 28; t++) begin
        ph = {phi4, phi3, phi2, phi1};
        checks++;
        if (!$onehot0(ph)) begin failures++; $display("FAIL overlap %b", ph); end
        if (ph == 0) gap++;
        for (int k = 0; k < 4; k++) if (ph[k]) hi[k]++;
        if (ph != 0 && ph != last_ph) begin order.push_back($clog2(ph)); last_ph = ph; end
        if (cycle_end) ends++;
        @(posedge clk); #0.1;
      end
      cyc++;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (hi[k] * 5 != 25) begin failures++; $display("FAIL phi%0d high %0d ns", k + 1, hi[k] * 5); end
      end
      checks++;
      if (gap * 5 != 40 || ends != 1 || order.size() < 4 || order[1] != 1 || order[2] != 2 || order[3] != 3) begin
        failures++; $display("FAIL gap=%0d ends=%0d order=%p", gap, ends, order);
      end
    end
    checks++;
    if (periods < 10 || bad_period != 0) begin failures++; $display("FAIL period count=%0d bad=%0d", periods, bad_period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
