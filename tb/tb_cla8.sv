// tb_cla8: exhaustive test of the 8-bit carry-lookahead block.
//
// For all 65,536 pairs of 8-bit operands and both carry-ins, the bit
// propagate p = a ^ b and generate g = a & b are applied, and the block's
// carries are checked through the sum bits p ^ c against integer addition,
// together with the carry-out and the block propagate (all p set).
// Combinational, read after #1. The p/g interface and cascaded 8-bit
// blocks follow the document; the test itself checks only arithmetic, so it
// holds for any correct lookahead structure. A watchdog ends a hung run with
// a failure.
module tb_cla8;
  int checks = 0, failures = 0;
  logic [7:0] p, g, pp, gg, c;
  logic cin, cout;

  cla8 dut (.p, .g, .cin, .pp, .gg, .c, .cout);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        for (int ci = 0; ci < 2; ci++) begin
          int s;
          p = 8'(a) ^ 8'(b); g = 8'(a) & 8'(b); cin = 1'(ci); #1;
          s = a + b + ci;
          checks++;
          if ((p ^ c) != 8'(s) || cout != s[8] || pp[7] != (p == 8'hff)) begin
            failures++;
            if (failures < 10) $display("FAIL a=%0d b=%0d ci=%0d", a, b, ci);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
