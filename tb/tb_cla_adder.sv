// tb_cla_adder: the final adder at W = 8 checked exhaustively and at W = 16
// with random operands, both against integer addition.
module tb_cla_adder;
  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16;
  logic        c8, c16, co8, co16;
  int checks = 0, failures = 0;

  cla_adder #(.W(8))  dut8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  cla_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {a8, b8, c8} = 17'(v);
      #1;
      checks++;
      if (int'({co8, s8}) != int'(a8) + int'(b8) + int'(c8)) begin
        failures++;
        if (failures < 10) $display("FAIL8 %0d+%0d+%0d got %0d", a8, b8, c8, {co8, s8});
      end
    end
    for (int v = 0; v < 20000; v++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
      #1;
      checks++;
      if (int'({co16, s16}) != int'(a16) + int'(b16) + int'(c16)) begin
        failures++;
        if (failures < 10) $display("FAIL16 %0d+%0d+%0d got %0d", a16, b16, c16, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
