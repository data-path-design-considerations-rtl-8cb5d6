// cla8: one 8-bit block of the ALU's carry-propagation section.
//
// From bit propagate p and generate g it forms the prefix terms over the
// block, P[i] = p[i] & ... & p[0] and G[i] = g[i] | p[i] & G[i-1] (the
// per-bit recurrence of the document's logic diagram), then the carry into
// every bit, c[i] = G[i-1] | P[i-1] & cin, and the block carry-out. Four of
// these blocks are cascaded through cin/cout to make the 32-bit adder.
// Combinational (the document evaluates it as domino logic in phi3).
module cla8 (
  input  logic [7:0] p,
  input  logic [7:0] g,
  input  logic       cin,
  output logic [7:0] pp,    // prefix propagate P<i:0>
  output logic [7:0] gg,    // prefix generate  G<i:0>
  output logic [7:0] c,     // carry into each bit
  output logic       cout
);
  assign pp[0] = p[0];
  assign gg[0] = g[0];
  for (genvar i = 1; i < 8; i++) begin : g_prefix
    assign pp[i] = p[i] & pp[i-1];
    assign gg[i] = g[i] | (p[i] & gg[i-1]);
  end

  assign c[0] = cin;
  for (genvar i = 1; i < 8; i++) begin : g_carry
    assign c[i] = gg[i-1] | (pp[i-1] & cin);
  end
  assign cout = gg[7] | (pp[7] & cin);
endmodule
