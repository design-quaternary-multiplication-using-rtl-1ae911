// tb_qsd_arith_top: end-to-end self-checking test of the QSD arithmetic unit
// with every parameter at its default (64-digit adder/subtractor, 4x4-digit
// parallel and iterative multipliers); expected values assume those defaults.
//
// Two processes run side by side on one clock:
//  * every cycle, new random operands go to the adder/subtractor and to the
//    parallel multiplier; their results are checked against integer
//    arithmetic 1 time unit later;
//  * the iterative multiplier runs back-to-back operations; each must finish
//    exactly 4 cycles after its start with the right product, and a start
//    given while it is busy must be ignored.
// The mechanisms of the design are counted and each must occur: a nonzero
// adder carry-out, addition, subtraction, a digit product of magnitude 9
// (carry of magnitude 2 in a partial product), nonzero carry-outs of both
// first-level adders of the parallel multiplier, completed iterative
// operations and ignored starts.
module tb_qsd_arith_top;
  import qsd_pkg::*;
  import qsd_tb_pkg::*;

  localparam int ND = 64;       // default adder width
  localparam int CYCLES = 20000;

  logic clk, rst_n;
  logic [3*ND-1:0] add_a, add_b, add_s;
  logic add_sub;
  logic [1:0] add_cout;
  logic [11:0] mul_a, mul_b, it_a, it_b;
  logic [26:0] mul_r, it_p;
  logic it_start, it_busy, it_done;

  int checks = 0, failures = 0;
  int n_add_cout = 0, n_add = 0, n_sub = 0, n_mag9 = 0, n_cout_lo = 0, n_cout_hi = 0;
  int n_iter = 0, n_ignored = 0;
  bit comb_done = 0;

  qsd_arith_top dut (
    .clk(clk), .rst_n(rst_n),
    .add_a(add_a), .add_b(add_b), .add_sub(add_sub), .add_s(add_s), .add_cout(add_cout),
    .mul_a(mul_a), .mul_b(mul_b), .mul_r(mul_r),
    .it_start(it_start), .it_a(it_a), .it_b(it_b),
    .it_busy(it_busy), .it_done(it_done), .it_p(it_p)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (CYCLES + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL: %s", msg);
  endtask

  // Reset, then the combinational units every cycle.
  initial begin
    rst_n = 1'b0;
    add_a = '0; add_b = '0; add_sub = 1'b0; mul_a = '0; mul_b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < CYCLES; t++) begin
      wide_t va, vb, vs, ve;
      longint vm;
      @(posedge clk);
      add_a   = (3*ND)'(rand_vec(ND, (t < 16) ? t % 4 : (t % 5 == 0) ? 3 : 0));
      add_b   = (3*ND)'(rand_vec(ND, (t < 16) ? t / 4 : (t % 7 == 0) ? 3 : 0));
      add_sub = 1'($urandom_range(1));
      mul_a   = 12'(rand_vec(4, (t < 9) ? t % 3 : 0));
      mul_b   = 12'(rand_vec(4, (t < 9) ? t / 3 : 0));
      #1;
      va = value(vec_t'(add_a), ND);
      vb = value(vec_t'(add_b), ND);
      ve = add_sub ? va - vb : va + vb;
      vs = value(vec_t'(add_s), ND) + (wide_t'(4) ** ND) * wide_t'(int'($signed(add_cout)));
      checks++;
      if (vs != ve || !legal(vec_t'(add_s), ND) || add_cout == 2'b10)
        fail($sformatf("adder cycle %0d sub=%0b", t, add_sub));
      if (add_sub) n_sub++; else n_add++;
      if (add_cout != '0) n_add_cout++;
      vm = longint'(value(vec_t'(mul_a), 4)) * longint'(value(vec_t'(mul_b), 4));
      checks++;
      if (longint'(value(vec_t'(mul_r), 9)) != vm || !legal(vec_t'(mul_r), 9))
        fail($sformatf("parallel multiplier a=%h b=%h r=%h", mul_a, mul_b, mul_r));
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          if (digit(vec_t'(mul_a), i) * digit(vec_t'(mul_b), j) inside {9, -9}) n_mag9++;
      if (dut.u_mult_par.g_lvl[1].g_reduce.g_term[0].cout != '0) n_cout_lo++;
      if (dut.u_mult_par.g_lvl[1].g_reduce.g_term[1].cout != '0) n_cout_hi++;
    end
    comb_done = 1;
  end

  // Iterative multiplier, back to back.
  initial begin
    it_start = 1'b0;
    it_a = '0;
    it_b = '0;
    wait (rst_n);
    while (!comb_done) begin
      logic [11:0] a_op, b_op;
      int lat;
      a_op = 12'(rand_vec(4, 0));
      b_op = 12'(rand_vec(4, (n_iter % 8 == 0) ? 1 : 0));
      @(posedge clk);
      #2;
      it_a = a_op;
      it_b = b_op;
      it_start = 1'b1;
      @(posedge clk);
      #2;
      it_start = n_iter[0];  // every other operation: start again while busy
      if (n_iter[0]) n_ignored++;
      it_a = ~a_op;
      it_b = ~b_op;
      lat = 0;
      checks++;
      if (!it_busy) fail("iterative multiplier not busy after start");
      while (!it_done && lat <= 6) begin
        @(posedge clk);
        #2;
        it_start = 1'b0;
        lat++;
      end
      checks++;
      if (lat != 4) fail($sformatf("iterative latency %0d", lat));
      checks++;
      if (longint'(value(vec_t'(it_p), 9)) !=
          longint'(value(vec_t'(a_op), 4)) * longint'(value(vec_t'(b_op), 4)) ||
          !legal(vec_t'(it_p), 9))
        fail($sformatf("iterative multiplier a=%h b=%h p=%h", a_op, b_op, it_p));
      n_iter++;
    end
    checks++;
    if (n_add_cout == 0) fail("adder carry-out never nonzero");
    checks++;
    if (n_add == 0 || n_sub == 0) fail("add or subtract mode never used");
    checks++;
    if (n_mag9 == 0) fail("no digit product of magnitude 9");
    checks++;
    if (n_cout_lo == 0 || n_cout_hi == 0) fail("first-level multiplier adder carry-out never nonzero");
    checks++;
    if (n_iter == 0 || n_ignored == 0) fail("iterative multiplier or ignored start never exercised");
    $display("adder: add %0d, subtract %0d, nonzero carry-out %0d", n_add, n_sub, n_add_cout);
    $display("parallel multiplier: magnitude-9 digit products %0d, level-1 carry-outs low %0d high %0d",
             n_mag9, n_cout_lo, n_cout_hi);
    $display("iterative multiplier: operations %0d, starts ignored while busy %0d", n_iter, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
