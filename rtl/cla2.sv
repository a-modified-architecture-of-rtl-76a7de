// cla2: 2-bit carry look-ahead adder with five inputs (a1, a0, b1, b0, cin).
//
// Used inside the hybrid CSA tree: after each level two more low columns
// receive no further operand bits, and a cla2 turns their sum and carry bits
// into two final result bits. The carry-out feeds the cla2 of the next level,
// so the low half of the result leaves the tree in binary form and the final
// adder only has to cover the high half.
// Both carries are computed directly from generate/propagate terms:
//   c1 = g0 | p0 cin,   cout = g1 | p1 g0 | p1 p0 cin.
// Purely combinational.
// The five-input 2-bit CLA is described; its gate equations are standard.
module cla2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);
  logic [1:0] g, p;
  logic       c1;

  assign g    = a & b;
  assign p    = a ^ b;
  assign c1   = g[0] | (p[0] & cin);
  assign cout = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
  assign s    = p ^ {c1, cin};
endmodule
