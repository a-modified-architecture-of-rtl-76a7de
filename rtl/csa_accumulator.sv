// csa_accumulator: hybrid carry-save adder tree merged with the accumulator
// (stage 2 of the MAC).
//
// The N/2 partial-product rows of one multiplication are added to the
// accumulated value from the previous cycle in a linear array of N/2+1
// carry-save levels:
//   level 0      accumulated sum/carry + row 0
//   level j      running sum/carry + row j (at column 2j) + N_(j-1) bit
//   level N/2    running sum/carry + sign-extension constant + N_(N/2-1) bit
// Each level is a row of full adders where three bits meet and half adders
// where only two do. From level 1 on, the two columns 2j-2 and 2j-1 get no
// further operand bits after level j; a 2-bit CLA (cla2) resolves them into
// two final bits, chaining its carry to the next level's cla2. After the
// last level the low N bits of the new total are therefore binary, and only
// the high N bits remain as a sum word and a carry word.
//
// State (registered, updated when en is high):
//   acc_lo  low N bits, binary
//   acc_sh, acc_ch  high N bits as sum and carry words
//   acc_cy  carry out of the cla2 chain, weight 2^N
// value = {acc_sh + acc_ch + acc_cy, acc_lo} mod 2^(2N).
// The state, not a final-adder result, is fed back, so the long carry
// propagation is outside the accumulation loop. acc_cy is fed back by
// choosing between two constants for the last level's constant row
// (K or K + 2^N), which costs no adder cells.
// clr starts a new sum: the feedback is taken as zero for this update.
// The carry out of the top column (2N-1) is dropped, so the accumulator
// wraps modulo 2^(2N); that cell's carry output is left unused.
// The number of levels, the FA/HA/2-bit-CLA mix and the sum/carry feedback
// follow the described architecture; the exact cell placement, the way the
// cla2 carry is fed back and the reset are this design's choices.
// Timing: one clock from rows to state; async active-low reset to zero.
module csa_accumulator
  import mac_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned M = N / 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               clr,
  input  logic [M-1:0][N:0]  rows,   // sign-inverted rows, row i at column 2i
  input  logic [M-1:0]       nbits,  // one's-complement correction bits
  output logic [N-1:0]       acc_lo,
  output logic [N-1:0]       acc_sh,
  output logic [N-1:0]       acc_ch,
  output logic               acc_cy
);

  localparam int unsigned AW = 2 * N;
  localparam logic [127:0] KFULL = sext_const(N);
  localparam logic [AW-1:0] K0 = KFULL[AW-1:0];
  localparam logic [AW-1:0] K1 = K0 + (AW'(1) << N);

  // Booth rows come in pairs of bits and the last tree level needs column
  // N-2: N must be even, at least 4, and at most 64 (width of sext_const).
  if (N % 2 != 0 || N < 4 || N > 64) begin : g_bad_n
    $error("N must be even and between 4 and 64");
  end

  // Operand row added at each level.
  function automatic logic [AW-1:0] level_row(int unsigned j,
                                               logic [M-1:0][N:0] r,
                                               logic [M-1:0] nb,
                                               logic cy);
    logic [AW-1:0] v;
    if (j == 0) begin
      v = AW'(r[0]);
    end else if (j < M) begin
      v = (AW'(r[j]) << (2 * j)) | (AW'(nb[j-1]) << (2 * j - 2));
    end else begin
      v = (cy ? K1 : K0) | (AW'(nb[M-1]) << (N - 2));
    end
    return v;
  endfunction

  // Whether the operand row of level j can have a bit in column k
  // (fixes the full-adder / half-adder choice).
  function automatic bit row_has_bit(int unsigned j, int unsigned k);
    if (j == 0)     return k <= N;
    else if (j < M) return (k == 2 * j - 2) || (k >= 2 * j && k <= 2 * j + N);
    else            return (k == N - 2) || (k >= N);
  endfunction

  // Whether the carry word entering level j can have a bit in column k.
  function automatic bit carry_has_bit(int unsigned j, int unsigned k);
    if (j == 0) return k >= N;   // fed back carry word is zero below N
    else        return 1'b1;
  endfunction

  logic [AW-1:0] fb_s, fb_c;
  logic          fb_cy;
  assign fb_s  = clr ? '0 : {acc_sh, acc_lo};
  assign fb_c  = clr ? '0 : {acc_ch, {N{1'b0}}};
  assign fb_cy = clr ? 1'b0 : acc_cy;

  wire [AW-1:0] sv [M+2];   // sum word entering level j (index j)
  wire [AW-1:0] cv [M+2];   // carry word entering level j
  wire [AW-1:0] rv [M+1];   // operand row of level j
  wire [M:0]    chain;      // cla2 carry chain
  wire [N-1:0]  lo_bits;

  assign sv[0]    = fb_s;
  assign cv[0]    = fb_c;
  assign chain[0] = 1'b0;

  for (genvar j = 0; j <= M; j++) begin : g_level
    localparam int unsigned LO = (j == 0) ? 0 : 2 * j - 2;
    assign rv[j] = level_row(j, rows, nbits, fb_cy);

    for (genvar k = 0; k < AW; k++) begin : g_col
      if (k < LO) begin : g_done
        assign sv[j+1][k] = 1'b0;
      end else begin : g_live
        wire s_o, c_o;
        if (row_has_bit(j, k) && carry_has_bit(j, k)) begin : g_fa
          full_adder u_fa (.a(sv[j][k]), .b(cv[j][k]), .c(rv[j][k]), .s(s_o), .co(c_o));
        end else if (row_has_bit(j, k)) begin : g_ha_r
          half_adder u_ha (.a(sv[j][k]), .b(rv[j][k]), .s(s_o), .co(c_o));
        end else begin : g_ha_c
          half_adder u_ha (.a(sv[j][k]), .b(cv[j][k]), .s(s_o), .co(c_o));
        end
        assign sv[j+1][k] = s_o;
        if (k + 1 < AW) begin : g_cout
          assign cv[j+1][k+1] = c_o;
        end
      end
      // carry word bits with no producing cell in this level
      if (k <= LO) begin : g_nocarry
        assign cv[j+1][k] = 1'b0;
      end
    end

    if (j >= 1) begin : g_cla
      cla2 u_cla (
        .a   (sv[j+1][2*j-1 -: 2]),
        .b   (cv[j+1][2*j-1 -: 2]),
        .cin (chain[j-1]),
        .s   (lo_bits[2*j-1 -: 2]),
        .cout(chain[j])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_lo <= '0;
      acc_sh <= '0;
      acc_ch <= '0;
      acc_cy <= 1'b0;
    end else if (en) begin
      acc_lo <= lo_bits;
      acc_sh <= sv[M+1][AW-1:N];
      acc_ch <= cv[M+1][AW-1:N];
      acc_cy <= chain[M];
    end
  end

endmodule
