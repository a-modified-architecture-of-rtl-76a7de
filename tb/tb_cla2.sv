// tb_cla2: exhaustive check of the 2-bit carry look-ahead adder against
// integer addition for all 32 input combinations.
module tb_cla2;
  logic [1:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla2 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int expv;
      {a, b, cin} = 5'(v);
      #1;
      expv = int'(a) + int'(b) + int'(cin);
      checks++;
      if (int'({cout, s}) != expv) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d got=%0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
