// tb_pp_generator: exhaustive check of one partial-product row for N = 8.
// For every multiplicand, every Booth digit and both signs the row must
// satisfy value(row) - 2^N + nbit = (sub ? -d : d) * x.
module tb_pp_generator;
  import mac_pkg::*;
  localparam int N = 8;

  logic [N-1:0] x;
  booth_digit_t digit;
  logic         sub;
  logic [N:0]   row;
  logic         nbit;
  int checks = 0, failures = 0;

  pp_generator #(.N(N)) dut (.x(x), .digit(digit), .sub(sub), .row(row), .nbit(nbit));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = -2; d <= 2; d++) begin
      for (int s = 0; s < 2; s++) begin
        for (int xv = 0; xv < (1 << N); xv++) begin
          int expv, got;
          x = N'(xv);
          sub = s[0];
          digit.neg = (d < 0);
          digit.one = (d == 1) || (d == -1);
          digit.two = (d == 2) || (d == -2);
          #1;
          expv = (s != 0 ? -d : d) * int'($signed(x));
          got  = int'(row) - (1 << N) + int'(nbit);
          checks++;
          if (got != expv) begin
            failures++;
            if (failures < 10)
              $display("FAIL x=%0d d=%0d sub=%0d exp=%0d got=%0d row=%b nbit=%b",
                       $signed(x), d, s, expv, got, row, nbit);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
