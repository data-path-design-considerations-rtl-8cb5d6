// tb_psw_regs: self-checking test of the user and kernel PSW registers.
//
// Each clock a random 40-bit value is written, or not, into UPSW or KPSW,
// with random hold and a random read select. The testbench keeps its own
// copy of both registers and compares both outputs and the selected read
// port one time step after each rising edge. That there are two PSWs, user
// and kernel, follows the document; their width and access are this
// design's. A watchdog ends a hung run with a failure.
module tb_psw_regs;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, hold = 0, we = 0, sel = 0, rd_sel = 0;
  word_t wdata, rdata, upsw, kpsw, mu, mk;

  psw_regs dut (.clk, .rst_n, .hold, .we, .sel, .wdata, .rd_sel, .rdata, .upsw, .kpsw);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wdata = '0; mu = '0; mk = '0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = $urandom % 2; sel = $urandom % 2; hold = ($urandom % 5 == 0);
      wdata = {8'($urandom), 32'($urandom)};
      if (we && !hold) begin if (sel) mk = wdata; else mu = wdata; end
      @(posedge clk); #1;
      rd_sel = $urandom % 2; #1;
      checks++;
      if (upsw !== mu || kpsw !== mk || rdata !== (rd_sel ? mk : mu)) begin failures++; $display("FAIL n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
