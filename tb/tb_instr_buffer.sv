// tb_instr_buffer: self-checking test of the instruction buffer.
//
// A function of the address stands in for main memory. The test checks that
// every word misses before it is filled, that after filling 128 consecutive
// words all of them hit at once with the right data, that filling a word
// with another tag in the same sub-block evicts the old sub-block's words
// without touching other sub-blocks, and that inv_all empties the buffer.
// Fills are written on a rising edge; lookups are read #1 after the address
// is applied. Size and organisation (128 words, 16 sub-blocks of 8) follow
// the document; per-word valid bits and one-word fills are this design's.
// A watchdog ends a hung run with a failure.
module tb_instr_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, inv_all = 0, fill_en = 0, hit;
  logic [29:0] fetch_addr, fill_addr;
  logic [31:0] instr, fill_data;

  instr_buffer dut (.clk, .rst_n, .inv_all, .fetch_addr, .hit, .instr, .fill_en, .fill_addr, .fill_data);
  always #5 clk = ~clk;

  function automatic logic [31:0] memval(logic [29:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h5a5a_0f0f;
  endfunction

  task automatic fill(logic [29:0] a);
    @(negedge clk); fill_en = 1; fill_addr = a; fill_data = memval(a);
    @(negedge clk); fill_en = 0;
  endtask

  task automatic expect_fetch(logic [29:0] a, logic exp_hit);
    fetch_addr = a; #1;
    checks++;
    if (hit !== exp_hit || (exp_hit && instr !== memval(a))) begin
      failures++; $display("FAIL addr=%h hit=%b exp=%b", a, hit, exp_hit);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [29:0] base;
    fetch_addr = 0; fill_addr = 0; fill_data = 0;
    @(negedge clk); rst_n = 1;
    base = 30'h0123_4000;
    for (int i = 0; i < 128; i++) expect_fetch(base + 30'(i), 1'b0);
    for (int i = 0; i < 128; i++) fill(base + 30'(i));
    for (int i = 0; i < 128; i++) expect_fetch(base + 30'(i), 1'b1);
    // same index, new tag: evicts only sub-block 3
    fill(base + 30'h80 + 30'd27);
    expect_fetch(base + 30'h80 + 30'd27, 1'b1);
    expect_fetch(base + 30'd27, 1'b0);
    expect_fetch(base + 30'd26, 1'b0);
    expect_fetch(base + 30'h80 + 30'd26, 1'b0);
    expect_fetch(base + 30'd35, 1'b1);
    // invalidate all
    @(negedge clk); inv_all = 1; @(negedge clk); inv_all = 0;
    for (int i = 0; i < 128; i += 9) expect_fetch(base + 30'(i), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
