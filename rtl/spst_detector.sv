// spst_detector: detection unit of the spurious power suppression technique.
//
// Looks at the multiplier operand only and flags every partial-product row
// whose radix-4 Booth digit is zero, i.e. whose 3-bit group is 000 or 111.
// Such a row cannot change the result, so the data-controlling latches of
// that row keep their old contents instead of loading it. A clear operation
// discards the product altogether, so it flags every row.
// Purely combinational: zero[i] belongs to group {y[2i+1], y[2i], y[2i-1]}.
// The detection unit and its single-operand input are described; the
// zero-digit test as its logic and the clear handling are this design's.
module spst_detector
  import mac_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned M = N / 2
) (
  input  logic [N-1:0] y,     // multiplier
  input  mac_op_e      op,
  output logic [M-1:0] zero   // row i contributes nothing
);

  logic [N:0] yx;  // multiplier with the implicit y[-1] = 0 appended

  always_comb begin
    yx = {y, 1'b0};
    for (int unsigned i = 0; i < M; i++) begin
      zero[i] = (yx[2*i+2 -: 3] == 3'b000) || (yx[2*i+2 -: 3] == 3'b111)
                || (op == OP_CLR);
    end
  end

endmodule
