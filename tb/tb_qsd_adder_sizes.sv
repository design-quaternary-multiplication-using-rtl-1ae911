// tb_qsd_adder_sizes: the carry-free QSD adder at every evaluated width, the
// digit equivalents of 4-, 8-, 16-, 32-, 64- and 128-bit binary adders
// (2, 4, 8, 16, 32 and 64 digits). Each width gets 5,000 random and extreme
// operand pairs; the N+1-digit result must equal a + b with legal digits, and
// the carry-out must be nonzero at least once per width.
module tb_qsd_adder_sizes;
  import qsd_pkg::*;
  import qsd_tb_pkg::*;

  localparam int NS = 6;
  localparam int SIZES [NS] = '{2, 4, 8, 16, 32, 64};
  localparam int TRIALS = 5000;

  int checks = 0, failures = 0, finished = 0;

  initial begin : watchdog
    #(20 * TRIALS);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NS; g++) begin : g_size
    localparam int N = SIZES[g];
    logic [3*N-1:0] a, b, s;
    qsd_carry_t cout;

    qsd_adder #(.N(N)) dut (.a(a), .b(b), .s(s), .cout(cout));

    initial begin
      automatic int cout_seen = 0;
      for (int t = 0; t < TRIALS; t++) begin
        wide_t vs;
        a = (3*N)'(rand_vec(N, (t < 16) ? t % 4 : (t % 5 == 0) ? 3 : 0));
        b = (3*N)'(rand_vec(N, (t < 16) ? t / 4 : (t % 7 == 0) ? 3 : 0));
        #1;
        vs = value(vec_t'(s), N) + (wide_t'(4) ** N) * wide_t'(int'(cout));
        checks++;
        if (vs != value(vec_t'(a), N) + value(vec_t'(b), N) || !legal(vec_t'(s), N) || cout == 2'b10) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d trial %0d: a=%h b=%h s=%h cout=%0d", N, t, a, b, s, cout);
        end
        if (cout != '0) cout_seen++;
      end
      checks++;
      if (cout_seen == 0) failures++;
      $display("N=%0d digits (%0d-bit equivalent): %0d sums, carry-out nonzero %0d", N, 2 * N, TRIALS, cout_seen);
      finished++;
    end
  end

  initial begin
    wait (finished == NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
