// tb_exec_unit: self-checking test of the Exec-stage functional units.
//
// Draws random 40-bit operands, an immediate, a PSW value and a random
// decoded operation for each of the five busD sources (ALU, shifter, byte
// extract, byte insert, PSW), with the immediate replacing busB half the
// time. The expected busD comes from the reference model in tb_ref_pkg,
// which computes each operation with plain operators and gives ALU and
// shifter results the tag of operand A; busS is checked against the
// reference ALU result. Combinational, read after #1. Tag handling via TAGA
// follows the document; the operation encodings and the PSW source are this
// design's. A watchdog ends a hung run with a failure.
module tb_exec_unit;
  import spur_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  word_t bus_a, bus_b, imm, psw, bus_d;
  data_t bus_s;
  logic use_imm, carry, equal, negative, overflow;
  ctrl_t c;

  exec_unit dut (.bus_a, .bus_b, .imm, .use_imm, .fu(c.fu), .alu_op(c.alu_op), .shift_op(c.shift_op),
                 .shamt(c.shamt), .byte_sel(c.byte_sel), .psw, .bus_d, .bus_s, .carry, .equal, .negative, .overflow);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      word_t b2, e;
      c = rand_ctrl(0);
      c.fu = fu_e'(n % 5);
      bus_a = rand_word(); bus_b = rand_word(); imm = rand_word(); psw = rand_word();
      use_imm = $urandom % 2;
      c.use_imm = use_imm; c.imm = imm;
      #1;
      b2 = use_imm ? imm : bus_b;
      e = ref_exec(c, bus_a, b2, psw);
      checks++;
      if (bus_d !== e || bus_s !== ref_alu(c.alu_op, bus_a[31:0], b2[31:0])) begin
        failures++; $display("FAIL fu=%s got %h exp %h", c.fu.name(), bus_d, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
