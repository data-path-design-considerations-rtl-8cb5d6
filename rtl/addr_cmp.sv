// addr_cmp: register-address equality comparator of the IF logic.
//
// Bitwise XOR of the two addresses followed by an OR across the bits, the
// structure the document uses (dynamic XOR per bit, then a domino OR); the
// match is reported only when enabled. Ports: two 5-bit addresses a and b,
// an enable en, and the match output. Combinational, with no clock; the IF
// logic registers its result. The XOR-then-OR structure follows the
// document; expressing it with gates rather than dynamic circuits is this
// design's choice.
module addr_cmp
  import spur_pkg::*;
(
  input  raddr_t a,
  input  raddr_t b,
  input  logic   en,
  output logic   match
);
  raddr_t diff;
  assign diff  = a ^ b;
  assign match = en && !(|diff);
endmodule
