// spst_mac: N x N multiplier-accumulator with radix-4 modified Booth
// encoding, a hybrid CSA tree that merges accumulation into the partial
// product compression, and spurious power suppression (SPST) on the
// partial-product rows. Three pipeline stages:
//
//   stage 1  Booth encoding of y, partial-product rows of x, SPST detection;
//            rows captured in SPST data-controlling registers, which keep
//            their old contents for rows whose Booth digit is zero.
//   stage 2  hybrid CSA tree + accumulator (csa_accumulator): rows are added
//            to the accumulated sum/carry; low N bits come out binary.
//   stage 3  final N-bit carry look-ahead adder on the high half; result
//            registered in acc_out.
//
// Interface: one operand pair per clock when in_valid is high; op chooses
// OP_MUL (acc = x*y), OP_MAC (acc += x*y), OP_MSU (acc -= x*y) or OP_CLR
// (acc = 0). x and y are two's complement; the accumulator is 2N bits and
// wraps modulo 2^(2N). Latency: the result of an operand pair presented at
// clock edge t appears on acc_out, with out_valid high, after edge t+2 (three
// register stages); throughput one operation per clock. Async active-low
// reset clears the accumulator and the output.
// The stage split, Booth recoding, N_i/S_i row format, the CSA with 2-bit
// CLAs, the sum/carry feedback and the final CLA follow the architecture
// described for this MAC; the operation set encoding, the valid handshake,
// the reset and the modular 2N-bit accumulator are this design's choices.
module spst_mac
  import mac_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  mac_op_e         op,
  input  logic [N-1:0]    x,         // multiplicand
  input  logic [N-1:0]    y,         // multiplier
  output logic            out_valid,
  output logic [2*N-1:0]  acc_out
);

  localparam int unsigned M = N / 2;

  // Booth rows come in pairs of bits and the last tree level needs column
  // N-2: N must be even, at least 4, and at most 64 (width of sext_const).
  if (N % 2 != 0 || N < 4 || N > 64) begin : g_bad_n
    $error("N must be even and between 4 and 64");
  end

  // ---------------- stage 1: Booth encoding, rows, SPST ----------------
  logic [N:0]          yx;
  booth_digit_t        digit [M];
  logic [M-1:0][N:0]   row_d;
  logic [M-1:0]        nbit_d;
  logic [M-1:0]        zero_d;
  logic [M-1:0][N:0]   row_q;
  logic [M-1:0]        nbit_q;
  logic                sub;

  assign yx  = {y, 1'b0};
  assign sub = (op == OP_MSU);

  spst_detector #(.N(N)) u_det (.y(y), .op(op), .zero(zero_d));

  for (genvar i = 0; i < M; i++) begin : g_row
    booth_encoder u_enc (.grp(yx[2*i+2 -: 3]), .digit(digit[i]));
    pp_generator #(.N(N)) u_ppg (
      .x(x), .digit(digit[i]), .sub(sub), .row(row_d[i]), .nbit(nbit_d[i])
    );
    spst_row_latch #(.W(N+1)) u_lat (
      .clk(clk), .rst_n(rst_n), .load(in_valid), .zero(zero_d[i]),
      .row_in(row_d[i]), .nbit_in(nbit_d[i]),
      .row_out(row_q[i]), .nbit_out(nbit_q[i])
    );
  end

  logic v1, clr1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      clr1 <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (in_valid) clr1 <= (op == OP_MUL) || (op == OP_CLR);
    end
  end

  // ---------------- stage 2: CSA tree + accumulator ----------------
  logic [N-1:0] acc_lo, acc_sh, acc_ch;
  logic         acc_cy;
  logic         v2;

  csa_accumulator #(.N(N)) u_csa (
    .clk(clk), .rst_n(rst_n), .en(v1), .clr(clr1),
    .rows(row_q), .nbits(nbit_q),
    .acc_lo(acc_lo), .acc_sh(acc_sh), .acc_ch(acc_ch), .acc_cy(acc_cy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
  end

  // ---------------- stage 3: final adder ----------------
  logic [N-1:0] hi;
  logic         hi_cout;   // wrap-around of the 2N-bit accumulator, not used

  cla_adder #(.W(N)) u_fin (
    .a(acc_sh), .b(acc_ch), .cin(acc_cy), .sum(hi), .cout(hi_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      acc_out   <= '0;
    end else begin
      out_valid <= v2;
      if (v2) acc_out <= {hi, acc_lo};
    end
  end

endmodule
