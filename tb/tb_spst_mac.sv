// tb_spst_mac: end-to-end test of the MAC at its default size (8 x 8).
// Random streams of OP_MUL / OP_MAC / OP_MSU / OP_CLR with idle cycles in
// between, plus directed corner operands (most negative values, all-zero
// and all-one multipliers). A reference model computes the 2N-bit result
// of each accepted operation with ordinary integer arithmetic; every result
// must appear exactly three clocks after its operands, and out_valid must
// never be high without a pending result.
// Mechanisms counted (each must occur): every operation, idle cycles,
// rows suppressed by SPST, multiplications with every row suppressed,
// negative and +/-2 Booth digits, the cla2 chain carry fed back into the
// accumulator, and accumulator wrap-around.
module tb_spst_mac;
  import mac_pkg::*;
  localparam int N   = 8;
  localparam int M   = N / 2;
  localparam int LAT = 3;
  localparam int OPS = 20000;

  logic           clk = 0, rst_n = 0;
  logic           in_valid;
  mac_op_e        op;
  logic [N-1:0]   x, y;
  logic           out_valid;
  logic [2*N-1:0] acc_out;

  int checks = 0, failures = 0;
  int n_op[4] = '{0, 0, 0, 0};
  int n_idle = 0, n_rows_supp = 0, n_all_supp = 0, n_neg = 0, n_two = 0;
  int n_cy = 0, n_wrap = 0;

  spst_mac dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .op(op), .x(x), .y(y),
    .out_valid(out_valid), .acc_out(acc_out)
  );

  always #5 clk = ~clk;

  // expected results, tagged with the cycle they must appear in
  logic [2*N-1:0] exp_q[$];
  int             due_q[$];
  int             cycle = 0;
  logic [2*N-1:0] ref_acc = '0;

  initial begin
    repeat (OPS * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*N-1:0] product(logic [N-1:0] a, logic [N-1:0] b);
    logic signed [2*N-1:0] pa, pb;
    pa = {{N{a[N-1]}}, a};
    pb = {{N{b[N-1]}}, b};
    return pa * pb;
  endfunction

  // output checker and bookkeeping, sampled just after each rising edge
  always @(posedge clk) begin
    #1;
    cycle++;
    if (rst_n) begin
      if (dut.u_csa.acc_cy) n_cy++;
      if (due_q.size() > 0 && due_q[0] == cycle) begin
        logic [2*N-1:0] e;
        void'(due_q.pop_front());
        e = exp_q.pop_front();
        checks++;
        if (!out_valid || acc_out != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle=%0d out_valid=%b acc_out=%h exp=%h", cycle, out_valid, acc_out, e);
        end
      end else if (out_valid) begin
        failures++;
        $display("FAIL cycle=%0d unexpected out_valid", cycle);
      end
    end
  end

  task automatic issue(mac_op_e o, logic [N-1:0] a, logic [N-1:0] b);
    logic [2*N-1:0] p, prev;
    @(negedge clk);
    in_valid = 1'b1; op = o; x = a; y = b;
    #1;
    for (int i = 0; i < M; i++) begin
      if (dut.zero_d[i]) n_rows_supp++;
      if (dut.digit[i].neg) n_neg++;
      if (dut.digit[i].two) n_two++;
    end
    if (&dut.zero_d) n_all_supp++;
    @(posedge clk);
    n_op[o]++;
    p = product(a, b);
    prev = ref_acc;
    case (o)
      OP_MUL: ref_acc = p;
      OP_MAC: begin
        ref_acc = ref_acc + p;
        if ((prev[2*N-1] == p[2*N-1]) && (ref_acc[2*N-1] != prev[2*N-1])) n_wrap++;
      end
      OP_MSU: begin
        ref_acc = ref_acc - p;
        if ((prev[2*N-1] != p[2*N-1]) && (ref_acc[2*N-1] != prev[2*N-1])) n_wrap++;
      end
      default: ref_acc = '0;
    endcase
    exp_q.push_back(ref_acc);
    due_q.push_back(cycle + LAT);
  endtask

  task automatic idle(int n);
    @(negedge clk);
    in_valid = 1'b0; x = N'($urandom); y = N'($urandom);
    repeat (n) begin @(posedge clk); n_idle++; @(negedge clk); end
  endtask

  function automatic logic [N-1:0] pick();
    case ($urandom_range(0, 9))
      0: return {1'b1, {(N-1){1'b0}}};   // most negative
      1: return {1'b0, {(N-1){1'b1}}};   // most positive
      2: return '0;
      3: return '1;
      default: return N'($urandom);
    endcase
  endfunction

  initial begin
    in_valid = 0; op = OP_MUL; x = '0; y = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // directed start: a multiply, accumulate, subtract, clear
    issue(OP_MUL, N'(3), N'(1));
    issue(OP_MAC, {1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}});
    issue(OP_MSU, N'(5), '1);
    issue(OP_CLR, N'(7), N'(9));
    idle(2);
    for (int k = 0; k < OPS; k++) begin
      int r;
      mac_op_e o;
      r = $urandom_range(0, 19);
      o = (r < 2) ? OP_MUL : (r < 12) ? OP_MAC : (r < 19) ? OP_MSU : OP_CLR;
      issue(o, pick(), pick());
      if ($urandom_range(0, 7) == 0) idle($urandom_range(1, 3));
    end
    idle(LAT + 2);
    if (due_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", due_q.size());
    end
    $display("ops: mul=%0d mac=%0d msu=%0d clr=%0d idle=%0d", n_op[0], n_op[1], n_op[2], n_op[3], n_idle);
    $display("spst rows suppressed=%0d all-rows-suppressed=%0d neg digits=%0d two digits=%0d",
             n_rows_supp, n_all_supp, n_neg, n_two);
    $display("cla2 chain carry fed back=%0d accumulator wraps=%0d", n_cy, n_wrap);
    if (n_op[0] == 0 || n_op[1] == 0 || n_op[2] == 0 || n_op[3] == 0 || n_idle == 0 ||
        n_rows_supp == 0 || n_all_supp == 0 || n_neg == 0 || n_two == 0 ||
        n_cy == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
