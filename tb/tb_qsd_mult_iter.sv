// tb_qsd_mult_iter: self-checking test of the iterative QSD multiplier at
// N = 4 (the default) and N = 8, both instances running side by side on one
// clock. Random and extreme operands are multiplied one after another. For
// each operation the testbench checks: busy rises after start, done pulses
// exactly N cycles after the start cycle and for one cycle only, the
// 2N+1-digit product has the value A * B with legal digits, and a start pulse
// given while busy is ignored (forced to occur and counted).
module tb_qsd_mult_iter;
  import qsd_pkg::*;
  import qsd_tb_pkg::*;

  localparam int NS = 2;
  localparam int SIZES [NS] = '{4, 8};
  localparam int OPS = 2000;

  logic clk, rst_n;
  int checks = 0, failures = 0, finished = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
  end

  initial begin : watchdog
    repeat (OPS * (8 + 4) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NS; g++) begin : g_size
    localparam int N = SIZES[g];
    logic start;
    logic [3*N-1:0] a, b;
    logic busy, done;
    logic [3*(2*N+1)-1:0] p;

    qsd_mult_iter #(.N(N)) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
      .busy(busy), .done(done), .p(p)
    );

    // Operands are driven and outputs sampled 1 time unit after a rising edge.
    initial begin
      automatic int ignored_starts = 0;
      start = 1'b0;
      a = '0;
      b = '0;
      wait (rst_n);
      for (int op = 0; op < OPS; op++) begin
        wide_t ve;
        int lat;
        logic [3*N-1:0] a_op, b_op;
        a_op = (3*N)'(rand_vec(N, (op < 9) ? op % 3 : 0));
        b_op = (3*N)'(rand_vec(N, (op < 9) ? op / 3 : 0));
        a     = a_op;
        b     = b_op;
        start = 1'b1;
        @(posedge clk);  // start sampled here
        #1;
        lat   = 0;
        start = 1'b0;
        // Disturb the operands, and every 4th operation pulse start while busy.
        a = ~a_op;
        b = ~b_op;
        checks++;
        if (!busy) begin
          failures++;
          $display("FAIL N=%0d op %0d: busy not raised", N, op);
        end
        if (op % 4 == 1) begin
          start = 1'b1;
          ignored_starts++;
        end
        while (!done && lat <= N + 2) begin
          @(posedge clk);
          #1;
          start = 1'b0;
          lat++;
        end
        ve = value(vec_t'(a_op), N) * value(vec_t'(b_op), N);
        checks++;
        if (lat != N) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d op %0d: latency %0d cycles, expected %0d", N, op, lat, N);
        end
        checks++;
        if (value(vec_t'(p), 2 * N + 1) != ve || !legal(vec_t'(p), 2 * N + 1) || busy) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d op %0d: a=%h b=%h p=%h expected value %0d", N, op, a_op, b_op, p, ve);
        end
        @(posedge clk);
        #1;
        checks++;
        if (done) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d op %0d: done longer than one cycle", N, op);
        end
      end
      checks++;
      if (ignored_starts == 0) failures++;
      $display("N=%0d: operations %0d, starts ignored while busy %0d", N, OPS, ignored_starts);
      finished++;
    end
  end

  initial begin
    wait (finished == NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
