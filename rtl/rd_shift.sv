// rd_shift: the RD shift register of the register file.
//
// Carries each instruction's destination (valid flag, 5-bit address and the
// window it was issued in) from Ifetch to the Write stage. Entry "exec" holds
// the instruction now executing, "mem" the one in Mem Acc and "wb" the one in
// Write; "wb" addresses the register-file write. The document specifies a
// shift register for RD; carrying the window pointer and a valid flag with it
// is this design's choice. Shifts once per pipeline cycle unless hold.
module rd_shift
  import spur_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      hold,
  input  rd_entry_t in,
  output rd_entry_t exec_q,
  output rd_entry_t mem_q,
  output rd_entry_t wb_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exec_q <= '0;
      mem_q  <= '0;
      wb_q   <= '0;
    end else if (!hold) begin
      exec_q <= in;
      mem_q  <= exec_q;
      wb_q   <= mem_q;
    end
  end
endmodule
