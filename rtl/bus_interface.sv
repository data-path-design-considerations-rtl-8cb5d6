// bus_interface: memory address register and memory strobes.
//
// At the end of the Exec cycle of a load or store the address on busS (the
// ALU result) is captured in MAR and the matching strobe is raised for the
// Mem Acc cycle that follows. During that cycle a store drives busL from MBR
// and a load's data is taken from busL into DST2 (in dst_mbr). The document
// gives these transfers; the separate read/write strobes are this design's
// memory handshake, and a memory without misses is assumed, as in the
// document's load example.
module bus_interface
  import spur_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  hold,
  input  logic  exec_is_load,
  input  logic  exec_is_store,
  input  data_t bus_s,
  input  word_t mbr,
  output data_t mar,
  output logic  mem_rd,
  output logic  mem_wr,
  output word_t mem_wdata
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mar    <= '0;
      mem_rd <= 1'b0;
      mem_wr <= 1'b0;
    end else if (!hold) begin
      mem_rd <= exec_is_load;
      mem_wr <= exec_is_store;
      if (exec_is_load || exec_is_store) mar <= bus_s;
    end
  end
  assign mem_wdata = mbr;
endmodule
