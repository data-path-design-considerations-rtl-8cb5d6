// tb_branch_cond: self-checking test of the compare-and-branch conditions.
//
// For random pairs A, B (one third equal, one third nearly equal) the
// testbench forms the ALU flags of A - B itself (Equal, carry, sign,
// overflow), drives them into branch_cond and compares the decision for each
// of the twelve conditions with SystemVerilog's own signed and unsigned
// comparisons of A and B. Combinational, read after #1. That branch
// conditions are derived from the ALU outputs follows the document; the
// condition set is this design's. A watchdog ends a hung run with a failure.
module tb_branch_cond;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  cond_e cond;
  logic equal, carry, negative, overflow, taken;

  branch_cond dut (.cond, .equal, .carry, .negative, .overflow, .taken);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a, b, d;
      logic [32:0] w;
      logic exp;
      a = $urandom; b = (n % 3 == 0) ? a : ((n % 3 == 1) ? a + 32'($urandom % 5) - 2 : $urandom);
      w = {1'b0, a} + {1'b0, ~b} + 33'd1;
      d = w[31:0];
      equal = (a == b); carry = w[32]; negative = d[31];
      overflow = (a[31] != b[31]) && (d[31] != a[31]);
      cond = cond_e'(n % 12);
      #1;
      case (cond)
        C_NEVER:  exp = 0;
        C_EQ:     exp = a == b;
        C_NE:     exp = a != b;
        C_LT:     exp = $signed(a) <  $signed(b);
        C_LE:     exp = $signed(a) <= $signed(b);
        C_GT:     exp = $signed(a) >  $signed(b);
        C_GE:     exp = $signed(a) >= $signed(b);
        C_LTU:    exp = a <  b;
        C_LEU:    exp = a <= b;
        C_GTU:    exp = a >  b;
        C_GEU:    exp = a >= b;
        default:  exp = 1;
      endcase
      checks++;
      if (taken !== exp) begin failures++; $display("FAIL cond=%s a=%h b=%h", cond.name(), a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
