// tb_spst_detector: exhaustive check of the SPST detection unit for N = 8.
// For every multiplier value and every operation, row i must be flagged
// exactly when its Booth digit (-2*y[2i+1] + y[2i] + y[2i-1]) is zero, and
// every row must be flagged for a clear.
module tb_spst_detector;
  import mac_pkg::*;
  localparam int N = 8;
  localparam int M = N / 2;

  logic [N-1:0] y;
  mac_op_e      op;
  logic [M-1:0] zero;
  int checks = 0, failures = 0;
  int flagged = 0;

  spst_detector #(.N(N)) dut (.y(y), .op(op), .zero(zero));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 4; o++) begin
      for (int yv = 0; yv < (1 << N); yv++) begin
        y  = N'(yv);
        op = mac_op_e'(o);
        #1;
        for (int i = 0; i < M; i++) begin
          int lsb, d;
          logic expz;
          lsb  = (i == 0) ? 0 : int'(y[2*i-1]);
          d    = -2 * int'(y[2*i+1]) + int'(y[2*i]) + lsb;
          expz = (d == 0) || (op == OP_CLR);
          checks++;
          if (zero[i]) flagged++;
          if (zero[i] != expz) begin
            failures++;
            $display("FAIL y=%b op=%0d row=%0d exp=%b got=%b", y, o, i, expz, zero[i]);
          end
        end
      end
    end
    if (flagged == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
