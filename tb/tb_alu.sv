// tb_alu: self-checking test of the 32-bit ALU.
//
// Applies corner values (0, all ones, sign boundaries, carries that ripple
// through all four 8-bit lookahead blocks) and random operands for each of
// Add, Subtract, AND, OR and XOR. Expected values come from integer
// arithmetic on the operands, not from the ALU's structure: a 33-bit sum for
// the carry, sign comparisons for overflow, A == B for Equal (checked on
// subtract, where it means A equals B). The ALU is combinational; each vector
// is applied and read back after #1. Which operations exist and that subtract
// is complement-plus-carry follow the document; the flag definitions are this
// design's. A watchdog ends the run with a failure if it hangs.
module tb_alu;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  data_t a, b, y;
  alu_op_e op;
  logic carry, equal, negative, overflow;

  alu dut (.a, .b, .op, .y, .carry, .equal, .negative, .overflow);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(data_t ta, data_t tb_, alu_op_e top);
    logic [32:0] wide;
    data_t ey;
    logic ec, ev;
    a = ta; b = tb_; op = top; #1;
    ec = 1'b0; ev = 1'b0;
    unique case (top)
      ALU_ADD: begin wide = {1'b0, ta} + {1'b0, tb_}; ey = wide[31:0]; ec = wide[32];
                     ev = (ta[31] == tb_[31]) && (ey[31] != ta[31]); end
      ALU_SUB: begin wide = {1'b0, ta} + {1'b0, ~tb_} + 33'd1; ey = wide[31:0]; ec = wide[32];
                     ev = (ta[31] != tb_[31]) && (ey[31] != ta[31]); end
      ALU_AND: ey = ta & tb_;
      ALU_OR:  ey = ta | tb_;
      default: ey = ta ^ tb_;
    endcase
    checks++;
    if (y !== ey) begin failures++; $display("FAIL op=%s a=%h b=%h y=%h exp=%h", top.name(), ta, tb_, y, ey); end
    if (top == ALU_ADD || top == ALU_SUB) begin
      checks++;
      if (carry !== ec || overflow !== ev || negative !== ey[31]) begin
        failures++; $display("FAIL flags op=%s a=%h b=%h", top.name(), ta, tb_);
      end
    end
    if (top == ALU_SUB) begin
      checks++;
      if (equal !== (ta == tb_)) begin failures++; $display("FAIL equal a=%h b=%h", ta, tb_); end
    end
  endtask

  initial begin
    alu_op_e ops[5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR};
    data_t corner[6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff, 32'h8000_0000, 32'h00ff_ff00};
    foreach (ops[k])
      foreach (corner[i])
        foreach (corner[j]) run(corner[i], corner[j], ops[k]);
    for (int n = 0; n < 20000; n++) begin
      data_t ra = $urandom, rb = $urandom;
      if (n % 4 == 0) rb = ra;
      run(ra, rb, ops[n % 5]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
