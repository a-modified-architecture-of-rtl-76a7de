// tb_csa_accumulator: random check of the hybrid CSA tree and accumulator
// for N = 8. Rows and correction bits are random (not only Booth rows), so
// every full adder, half adder and cla2 path is exercised. Each enabled
// update adds sum_i 4^i * (row_i - 2^N + nbit_i) to a reference total (or
// starts a new one on clr); after every clock the state
// {acc_sh + acc_ch + acc_cy, acc_lo} must equal the reference mod 2^(2N).
module tb_csa_accumulator;
  localparam int N = 8;
  localparam int M = N / 2;
  localparam longint MASK = (64'd1 << (2 * N)) - 1;

  logic clk = 0, rst_n = 0;
  logic en, clr;
  logic [M-1:0][N:0] rows;
  logic [M-1:0]      nbits;
  logic [N-1:0] acc_lo, acc_sh, acc_ch;
  logic         acc_cy;
  int checks = 0, failures = 0;
  int cy_seen = 0, clr_seen = 0, hold_seen = 0;
  longint ref_acc;

  csa_accumulator #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .rows(rows), .nbits(nbits),
    .acc_lo(acc_lo), .acc_sh(acc_sh), .acc_ch(acc_ch), .acc_cy(acc_cy)
  );

  always #5 clk = ~clk;

  function automatic longint state_value();
    longint hi;
    hi = (longint'(acc_sh) + longint'(acc_ch) + longint'(acc_cy)) & ((64'd1 << N) - 1);
    return (hi << N) | longint'(acc_lo);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; clr = 0; rows = '0; nbits = '0;
    ref_acc = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      longint inc;
      @(negedge clk);
      en  = ($urandom_range(0, 7) != 0);
      clr = ($urandom_range(0, 15) == 0);
      for (int i = 0; i < M; i++) rows[i] = (N+1)'($urandom);
      nbits = M'($urandom);
      inc = 0;
      for (int i = 0; i < M; i++)
        inc += (longint'(rows[i]) - (64'd1 << N) + longint'(nbits[i])) << (2 * i);
      @(posedge clk);
      if (en) begin
        ref_acc = ((clr ? 0 : ref_acc) + inc) & MASK;
        if (clr) clr_seen++;
      end else begin
        hold_seen++;
      end
      #1;
      if (acc_cy) cy_seen++;
      checks++;
      if (state_value() != ref_acc) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d exp=%h got=%h (lo=%h sh=%h ch=%h cy=%b)",
                   t, ref_acc, state_value(), acc_lo, acc_sh, acc_ch, acc_cy);
      end
    end
    if (cy_seen == 0 || clr_seen == 0 || hold_seen == 0) begin
      failures++;
      $display("coverage hole: cy=%0d clr=%0d hold=%0d", cy_seen, clr_seen, hold_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
