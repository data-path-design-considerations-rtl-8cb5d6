// tb_byte_ext_ins: self-checking test of the byte extractor and inserter.
//
// For random 40-bit source and insert words and every byte_sel value (0-3
// the data bytes from least significant up, 4-7 the tag byte), the expected
// extract (byte shifted to bit 0, zero-filled) and insert (byte replaced by
// the low byte of the insert word) are computed with shifts and masks in the
// testbench and compared with the unit's two outputs. Combinational, read
// after #1. The two operations follow the document; byte numbering and zero
// fill are this design's. A watchdog ends a hung run with a failure.
module tb_byte_ext_ins;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  word_t src, ins, ext, inw, eext, einw;
  logic [2:0] byte_sel;

  byte_ext_ins dut (.src, .ins, .byte_sel, .extracted(ext), .inserted(inw));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int k;
      src = {8'($urandom), 32'($urandom)};
      ins = {8'($urandom), 32'($urandom)};
      byte_sel = 3'(n);
      k = (n % 8) >= 4 ? 4 : n % 8;
      #1;
      eext = 40'((src >> (8 * k)) & 40'hff);
      einw = (src & ~(40'hff << (8 * k))) | (40'(ins[7:0]) << (8 * k));
      checks++;
      if (ext !== eext || inw !== einw) begin
        failures++; $display("FAIL sel=%0d src=%h ins=%h ext=%h ins=%h", byte_sel, src, ins, ext, inw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
