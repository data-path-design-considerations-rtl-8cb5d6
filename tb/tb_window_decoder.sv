// tb_window_decoder: checks the overlapping-window mapping.
// For every window and logical address the row is compared with a reference
// built from the register layout (globals shared by all windows, 16 rows per
// window, parent-overlap rows equal to the next window's child-overlap rows).
// It also checks that the 8 windows together use each of the 138 rows, and
// that the two names of a shared row differ only in address bit 4.
module tb_window_decoder;
  import spur_pkg::*;
  int checks = 0, failures = 0;
  raddr_t addr;
  cwp_t   cwp;
  paddr_t row;
  int used [NREGS];

  window_decoder dut (.addr, .cwp, .row);

  function automatic int ref_row(int a, int w);
    if (a < 10) return a;
    if (a < 16) return 10 + 16 * w + 10 + (a - 10);
    if (a < 26) return 10 + 16 * w + (a - 16);
    return 10 + 16 * ((w + 1) % 8) + 10 + (a - 26);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (used[i]) used[i] = 0;
    for (int w = 0; w < 8; w++) begin
      for (int a = 0; a < 32; a++) begin
        addr = raddr_t'(a); cwp = cwp_t'(w); #1;
        checks++;
        if (int'(row) != ref_row(a, w)) begin
          failures++;
          $display("FAIL w=%0d a=%0d row=%0d exp=%0d", w, a, row, ref_row(a, w));
        end
        if (int'(row) < NREGS) used[row]++;
      end
    end
    // every row is reached; globals 8x, windowed rows: locals 1x, overlap 2x
    for (int r = 0; r < NREGS; r++) begin
      checks++;
      if (used[r] == 0) begin failures++; $display("FAIL row %0d unused", r); end
    end
    // parent overlap of window w == child overlap of window w+1, addresses differ in bit 4 only
    for (int w = 0; w < 8; w++) begin
      for (int k = 0; k < 6; k++) begin
        paddr_t r1;
        addr = raddr_t'(26 + k); cwp = cwp_t'(w); #1; r1 = row;
        addr = raddr_t'(10 + k); cwp = cwp_t'((w + 1) % 8); #1;
        checks++;
        if (r1 != row || ((5'(26 + k) ^ 5'(10 + k)) != 5'b10000)) begin
          failures++; $display("FAIL overlap w=%0d k=%0d", w, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
