// tb_qsd_addsub: self-checking test of the N-digit QSD adder/subtractor at its
// default width (64 digits). Random and extreme operands with sub = 0 and 1;
// the N+1-digit result must equal a + b or a - b and every digit must be
// legal. Both modes must be exercised.
module tb_qsd_addsub;
  import qsd_pkg::*;
  import qsd_tb_pkg::*;

  localparam int N = 64;
  localparam int TRIALS = 20000;

  logic [3*N-1:0] a, b, s;
  logic sub;
  qsd_carry_t cout;
  int checks = 0, failures = 0, n_sub = 0, n_add = 0;

  qsd_addsub dut (.a(a), .b(b), .sub(sub), .s(s), .cout(cout));

  initial begin : watchdog
    #(10 * TRIALS);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < TRIALS; t++) begin
      wide_t va, vb, vs, ve;
      a   = (3*N)'(rand_vec(N, (t < 32) ? t % 4 : (t % 5 == 0) ? 3 : 0));
      b   = (3*N)'(rand_vec(N, (t < 32) ? (t / 4) % 4 : (t % 7 == 0) ? 3 : 0));
      sub = (t < 32) ? t[4] : 1'($urandom_range(1));
      #1;
      va = value(vec_t'(a), N);
      vb = value(vec_t'(b), N);
      vs = value(vec_t'(s), N) + (wide_t'(4) ** N) * wide_t'(int'(cout));
      ve = sub ? va - vb : va + vb;
      if (sub) n_sub++; else n_add++;
      checks++;
      if (vs != ve || !legal(vec_t'(s), N) || cout == 2'b10) begin
        failures++;
        if (failures < 10) $display("FAIL trial %0d sub=%0b: a=%h b=%h s=%h cout=%0d", t, sub, a, b, s, cout);
      end
    end
    checks++;
    if (n_sub == 0 || n_add == 0) failures++;
    $display("add %0d, subtract %0d", n_add, n_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
