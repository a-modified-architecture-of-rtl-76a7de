// tb_spst_row_latch: random check of the SPST data-controlling register.
// A reference model tracks the stored row and flag. Checked every cycle:
// the outputs (neutral row while the last accepted row was ineffective),
// and that the stored row never changes unless an effective row is loaded.
module tb_spst_row_latch;
  localparam int W = 9;
  localparam logic [W-1:0] NEUTRAL = {1'b1, {(W-1){1'b0}}};

  logic         clk = 0, rst_n = 0;
  logic         load, zero, nbit_in;
  logic [W-1:0] row_in;
  logic [W-1:0] row_out;
  logic         nbit_out;
  int checks = 0, failures = 0;
  int held = 0;

  logic [W-1:0] m_row;
  logic         m_nbit, m_zero;

  spst_row_latch #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .zero(zero), .row_in(row_in),
    .nbit_in(nbit_in), .row_out(row_out), .nbit_out(nbit_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; zero = 0; row_in = '0; nbit_in = 0;
    m_row = NEUTRAL; m_nbit = 0; m_zero = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      logic [W-1:0] prev_row;
      @(negedge clk);
      load    = ($urandom_range(0, 3) != 0);
      zero    = ($urandom_range(0, 2) == 0);
      row_in  = W'($urandom);
      nbit_in = 1'($urandom);
      prev_row  = dut.row_q;
      @(posedge clk);
      if (load && !zero) begin m_row = row_in; m_nbit = nbit_in; end
      if (load) m_zero = zero;
      #1;
      checks++;
      if (row_out != (m_zero ? NEUTRAL : m_row) || nbit_out != (m_nbit & ~m_zero)) begin
        failures++;
        $display("FAIL t=%0d row_out=%b exp=%b", t, row_out, m_zero ? NEUTRAL : m_row);
      end
      if (!(load && !zero)) begin
        checks++;
        held++;
        if (dut.row_q != prev_row) begin
          failures++;
          $display("FAIL t=%0d stored row changed while suppressed", t);
        end
      end
    end
    if (held == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
