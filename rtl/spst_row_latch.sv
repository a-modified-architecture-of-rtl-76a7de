// spst_row_latch: data-controlling register of the spurious power
// suppression technique for one partial-product row.
//
// On an accepted operand (load high) the row is captured only if the
// detection unit found it effective (zero low). An ineffective row leaves
// the storage untouched, so no transition ripples into the adder tree from
// it; a registered flag instead makes the output present the neutral row
// {1, 0...0} with nbit = 0 (the encoding of a zero product row after the
// sign-bit inversion). Without load nothing changes at all.
// Timing: one clock of latency; async active-low reset to the neutral row.
// The document latches the ineffective portion; this design uses an
// edge-triggered register with enable, which has the same effect on the
// datapath and keeps the design free of level-sensitive latches.
module spst_row_latch #(
  parameter int unsigned W = 9   // row width, N+1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         zero,
  input  logic [W-1:0] row_in,
  input  logic         nbit_in,
  output logic [W-1:0] row_out,
  output logic         nbit_out
);

  localparam logic [W-1:0] NEUTRAL = {1'b1, {(W-1){1'b0}}};

  logic [W-1:0] row_q;
  logic         nbit_q;
  logic         zero_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q  <= NEUTRAL;
      nbit_q <= 1'b0;
    end else if (load && !zero) begin
      row_q  <= row_in;
      nbit_q <= nbit_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    zero_q <= 1'b1;
    else if (load) zero_q <= zero;
  end

  assign row_out  = zero_q ? NEUTRAL : row_q;
  assign nbit_out = nbit_q & ~zero_q;

endmodule
