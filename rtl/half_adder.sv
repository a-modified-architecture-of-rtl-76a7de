// half_adder: one-bit half adder cell (2:2 counter) of the CSA tree, used in
// columns where a level has only two operand bits.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
