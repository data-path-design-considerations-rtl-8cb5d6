// tb_fwd_mux: self-checking test of one operand bus's forwarding chain.
//
// Random bit-line, DST2 and DST1 words are applied with all four
// combinations of the two selects, and the bus must show the bit line when
// neither is set, DST2 or DST1 when one is set, and DST1 when both are set.
// Combinational, read after #1. The DST1-over-DST2 priority follows the
// document; nothing in this test is this design's own choice. A watchdog
// ends a hung run with a failure.
module tb_fwd_mux;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  word_t bitline, dst2, dst1, bus, e;
  logic dst2_sel, dst1_sel;

  fwd_mux dut (.bitline, .dst2, .dst1, .dst2_sel, .dst1_sel, .bus);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      bitline = {8'($urandom), 32'($urandom)};
      dst2    = {8'($urandom), 32'($urandom)};
      dst1    = {8'($urandom), 32'($urandom)};
      {dst1_sel, dst2_sel} = 2'(n);
      #1;
      e = dst1_sel ? dst1 : (dst2_sel ? dst2 : bitline);
      checks++;
      if (bus !== e) begin failures++; $display("FAIL sel=%b%b", dst1_sel, dst2_sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
