// tb_qsd_adder: self-checking test of the N-digit carry-free QSD adder at its
// default width (64 digits). Random and extreme operands (all +3, all -3,
// digits of magnitude 2..3 only) are applied; the N+1-digit result
// (s plus cout) must have the value a + b, every digit must be legal, and
// the carry-out must be nonzero in some cases (counted and required).
module tb_qsd_adder;
  import qsd_pkg::*;
  import qsd_tb_pkg::*;

  localparam int N = 64;
  localparam int TRIALS = 20000;

  logic [3*N-1:0] a, b, s;
  qsd_carry_t cout;
  int checks = 0, failures = 0, cout_seen = 0;

  qsd_adder dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin : watchdog
    #(10 * TRIALS);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < TRIALS; t++) begin
      wide_t va, vb, vs;
      a = (3*N)'(rand_vec(N, (t < 16) ? t % 4 : (t % 5 == 0) ? 3 : 0));
      b = (3*N)'(rand_vec(N, (t < 16) ? t / 4 : (t % 7 == 0) ? 3 : 0));
      #1;
      va = value(vec_t'(a), N);
      vb = value(vec_t'(b), N);
      vs = value(vec_t'(s), N) + (wide_t'(4) ** N) * wide_t'(int'(cout));
      checks++;
      if (vs != va + vb) begin
        failures++;
        if (failures < 10) $display("FAIL trial %0d: a=%h b=%h s=%h cout=%0d", t, a, b, s, cout);
      end
      checks++;
      if (!legal(vec_t'(s), N) || cout == 2'b10) begin
        failures++;
        if (failures < 10) $display("FAIL trial %0d: illegal digit in result", t);
      end
      if (cout != '0) cout_seen++;
    end
    checks++;
    if (cout_seen == 0) begin
      failures++;
      $display("FAIL carry-out never exercised");
    end
    $display("carry-out nonzero in %0d of %0d trials", cout_seen, TRIALS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
