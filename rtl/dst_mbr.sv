// dst_mbr: DST1, DST2 and MBR, the temporary registers of the lower data path.
//
// DST1 captures busD at the end of every Exec cycle. At the end of Mem Acc,
// DST2 takes busL (the loaded word) for a load and DST1 otherwise; DST2 is
// the value written into the register file in the Write stage. MBR captures
// busB in the Exec cycle of a store and drives busL in the next cycle. All
// three follow the document's register-transfer tables; the reset value of
// zero and the hold input (a suspended pipeline) are this design's.
module dst_mbr
  import spur_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  hold,
  input  word_t bus_d,        // functional-unit result, Exec
  input  logic  mem_is_load,  // instruction in Mem Acc is a load
  input  word_t bus_l_in,     // memory data, Mem Acc
  input  logic  exec_is_store,
  input  word_t bus_b,        // store data, Exec
  output word_t dst1,
  output word_t dst2,
  output word_t mbr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst1 <= '0;
      dst2 <= '0;
      mbr  <= '0;
    end else if (!hold) begin
      dst1 <= bus_d;
      dst2 <= mem_is_load ? bus_l_in : dst1;
      if (exec_is_store) mbr <= bus_b;
    end
  end
endmodule
