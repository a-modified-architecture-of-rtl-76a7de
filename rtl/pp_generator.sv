// pp_generator: one partial-product row of the radix-4 Booth multiplier.
//
// Selects 0, X or 2X (N+1 bits, two's complement) from the Booth digit and,
// for a negative digit, inverts it (one's complement). The missing +1 of the
// two's complement leaves as the separate correction bit nbit (the "N_i" bit),
// which the adder tree adds at the row's least significant column.
// The sign bit of the row is then inverted (the "S_i" sign-extension
// simplification): row is the row value plus 2^N, always non-negative, so no
// sign extension is needed in the tree; a single constant removes the offsets.
//   value(row) - 2^N + nbit = d * X
// With sub high the digit's sign is flipped, which makes the row -d*X
// (used for multiply-subtract; this operand-negation input is a choice of
// this design). A zero digit gives row = {1, 0...0}, nbit = 0.
// Purely combinational.
module pp_generator
  import mac_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,      // multiplicand, two's complement
  input  booth_digit_t digit,
  input  logic         sub,    // negate the digit
  output logic [N:0]   row,    // sign-inverted one's-complement row
  output logic         nbit    // one's-complement correction bit
);

  logic [N:0] mag;
  logic       negeff;
  logic [N:0] pp;

  always_comb begin
    if (digit.one)      mag = {x[N-1], x};
    else if (digit.two) mag = {x, 1'b0};
    else                mag = '0;
    negeff = (digit.neg ^ sub) & (digit.one | digit.two);
    pp     = negeff ? ~mag : mag;
    row    = {~pp[N], pp[N-1:0]};
    nbit   = negeff;
  end

endmodule
