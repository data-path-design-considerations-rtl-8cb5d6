// fwd_mux: double internal forwarding onto one operand bus (busA or busB).
//
// The register-file bit line is passed to the bus unless a forwarding signal
// disconnects it: DST2 replaces it when dst2_sel is set, and DST1 replaces
// whatever is left when dst1_sel is set. The chain order gives DST1, the more
// recent result, precedence when both match, as the document requires.
// Combinational.
module fwd_mux
  import spur_pkg::*;
(
  input  word_t bitline,
  input  word_t dst2,
  input  word_t dst1,
  input  logic  dst2_sel,
  input  logic  dst1_sel,
  output word_t bus
);
  word_t stage2;
  assign stage2 = dst2_sel ? dst2 : bitline;
  assign bus    = dst1_sel ? dst1 : stage2;
endmodule
