// cla_adder: W-bit carry look-ahead adder, the final adder of the MAC.
//
// Every carry is formed directly from the generate (g = a & b) and propagate
// (p = a ^ b) signals of the bits below it and the carry-in:
//   c[i+1] = g[i] | p[i] g[i-1] | ... | p[i]..p[1] g[0] | p[i]..p[0] cin
// so no carry ripples from bit to bit. sum = p ^ c. Purely combinational.
// A carry look-ahead final adder is the described choice; its width (N,
// the high half only) and flat single-level look-ahead are this design's.
module cla_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g, p;
  logic [W:0]   c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = cin;
    for (int unsigned i = 0; i < W; i++) begin
      logic term;
      logic chain;
      term  = g[i];
      chain = p[i];
      for (int k = int'(i) - 1; k >= 0; k--) begin
        term  = term | (chain & g[k]);
        chain = chain & p[k];
      end
      c[i+1] = term | (chain & cin);
    end
    sum  = p ^ c[W-1:0];
    cout = c[W];
  end

endmodule
