// tb_regfile: the register file against a 138-entry reference array.
// Random writes through random windows and random reads are issued; a read
// address given in one cycle shows its row in the next. It checks that a
// write to a row read in the same cycle gives the old value, that an overlap
// register written in one window is read in the neighbouring window, that
// globals are shared, and that hold blocks writes and keeps the latches.
module tb_regfile;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, hold = 0, we = 0;
  raddr_t rs1, rs2, wr_addr;
  cwp_t cwp, wr_cwp;
  word_t wr_data, bl_a, bl_b;
  word_t model [NREGS];
  int overlap_hits = 0;

  regfile dut (.clk, .rst_n, .hold, .rs1, .rs2, .cwp, .we, .wr_addr, .wr_cwp, .wr_data,
               .bitline_a(bl_a), .bitline_b(bl_b));
  always #5 clk = ~clk;

  function automatic int ref_row(int a, int w);
    if (a < 10) return a;
    if (a < 16) return 20 + 16 * w + (a - 10);
    if (a < 26) return 10 + 16 * w + (a - 16);
    return 20 + 16 * ((w + 1) % 8) + (a - 26);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    rs1 = 0; rs2 = 0; cwp = 0; wr_addr = 0; wr_cwp = 0; wr_data = 0;
    @(negedge clk); rst_n = 1;
    // fill every row of every window
    for (int w = 0; w < 8; w++)
      for (int a = 0; a < 32; a++) begin
        @(negedge clk);
        we = 1; wr_addr = raddr_t'(a); wr_cwp = cwp_t'(w);
        wr_data = {8'($urandom), 32'($urandom)};
        model[ref_row(a, w)] = wr_data;
      end
    @(negedge clk); we = 0;
    ea = -1; eb = -1;
    for (int n = 0; n < 3000; n++) begin
      int wrow;
      @(negedge clk);
      // values expected now, from the addresses latched last cycle
      if (ea >= 0) begin
        checks++;
        if (bl_a !== model[ea] || bl_b !== model[eb]) begin
          failures++; $display("FAIL n=%0d row %0d/%0d", n, ea, eb);
        end
      end
      hold = ($urandom % 8 == 0);
      we = $urandom % 2;
      wr_addr = raddr_t'($urandom); wr_cwp = cwp_t'($urandom); wr_data = {8'($urandom), 32'($urandom)};
      wrow = ref_row(int'(wr_addr), int'(wr_cwp));
      #1;
      if (ea >= 0 && we && wrow == ea) begin  // write pending on the row being read: old value
        checks++;
        if (bl_a !== model[ea]) begin failures++; $display("FAIL read-during-write n=%0d", n); end
      end
      if (!hold) begin
        rs1 = raddr_t'($urandom); rs2 = raddr_t'($urandom); cwp = cwp_t'($urandom);
        if (n % 5 == 0 && wr_addr >= 26) begin  // read the same row from the child-side window
          rs1 = wr_addr - 5'd16; cwp = wr_cwp + 3'd1; overlap_hits++;
        end
      end
      @(posedge clk); #1;
      // write lands at the edge; the read of this cycle's row (ea) saw the old value
      if (!hold) begin
        ea = ref_row(int'(rs1), int'(cwp)); eb = ref_row(int'(rs2), int'(cwp));
      end
      if (we && !hold) model[wrow] = wr_data;
    end
    checks++;
    if (overlap_hits == 0) begin failures++; $display("FAIL no overlap reads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
