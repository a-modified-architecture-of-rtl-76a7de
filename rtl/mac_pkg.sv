// mac_pkg: types and constants shared by the SPST multiplier-accumulator.
//
// mac_op_e selects what one accepted operand pair does to the accumulator.
// booth_digit_t is one radix-4 modified Booth digit in sign/magnitude form
// (neg, one = |d|==1, two = |d|==2). sext_const() returns the constant that
// completes the sign-extension simplification: every partial-product row is
// fed to the adder tree with its sign bit inverted, which adds 2^N * 4^i to
// row i; the tree adds this constant once to take all of them back out.
package mac_pkg;

  typedef enum logic [1:0] {
    OP_MUL = 2'd0,  // acc = x*y        (start a new sum)
    OP_MAC = 2'd1,  // acc = acc + x*y
    OP_MSU = 2'd2,  // acc = acc - x*y
    OP_CLR = 2'd3   // acc = 0
  } mac_op_e;

  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_digit_t;

  // -(sum over rows i of 2^(n+2i)) modulo 2^(2n), for an n x n multiplier
  // with n/2 rows. Valid for n up to 64.
  function automatic logic [127:0] sext_const(int unsigned n);
    logic [127:0] sum;
    sum = '0;
    for (int unsigned i = 0; i < n / 2; i++) sum += (128'd1 << (n + 2 * i));
    return (~sum + 128'd1) & ((128'd1 << (2 * n)) - 128'd1);
  endfunction

endpackage
