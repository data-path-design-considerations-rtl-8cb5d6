// tb_shifter: self-checking test of the shifter.
//
// Random data words go through each operation (logical left by 0-3, logical
// right by 1, arithmetic right by 1), and the results are compared with
// SystemVerilog's own <<, >> and >>> operators. Combinational, read after
// #1. The set of shifts follows the document; the pass-through for a
// left shift of 0 is this design's. A watchdog ends a hung run with a
// failure.
module tb_shifter;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  data_t d, y, e;
  shift_op_e op;
  logic [1:0] amount;

  shifter dut (.d, .op, .amount, .y);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      d = $urandom; amount = 2'(n); op = shift_op_e'(n % 3); #1;
      case (op)
        SH_SLL: e = d << amount;
        SH_SRL: e = d >> 1;
        default: e = data_t'($signed(d) >>> 1);
      endcase
      checks++;
      if (y !== e) begin failures++; $display("FAIL op=%0d amt=%0d d=%h y=%h exp=%h", op, amount, d, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
