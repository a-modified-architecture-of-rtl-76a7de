// booth_encoder: radix-4 modified Booth recoder for one multiplier group.
//
// The multiplier is cut into overlapping 3-bit groups {y[2i+1], y[2i], y[2i-1]}
// (y[-1] = 0). Each group is recoded into one signed digit in {-2,-1,0,+1,+2}
// following the standard radix-4 recoding table:
//   000 -> 0, 001 -> +1, 010 -> +1, 011 -> +2,
//   100 -> -2, 101 -> -1, 110 -> -1, 111 -> 0.
// The digit comes out as three one-hot-style control lines for the
// partial-product generator: one (|d| = 1), two (|d| = 2) and neg (d < 0).
// A zero digit has all three lines low, so 111 does not raise neg.
// Purely combinational.
// The recoding table is the standard one the design is built on; the
// neg/one/two signal form is this design's choice.
module booth_encoder
  import mac_pkg::*;
(
  input  logic [2:0]   grp,   // {y[2i+1], y[2i], y[2i-1]}
  output booth_digit_t digit
);

  always_comb begin
    digit.one = grp[1] ^ grp[0];
    digit.two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    digit.neg = grp[2] & ~(grp[1] & grp[0]);
  end

endmodule
