// tb_qsd_ppgen: exhaustive self-checking test of the 4-digit QSD partial
// product generator: every 4-digit multiplicand (7^4) times every multiplier
// digit (7). The 5-digit result must have the value a * b with legal digits.
// Operands producing a digit product of +-9 (carry of magnitude 2) are
// counted and must occur.
module tb_qsd_ppgen;
  import qsd_pkg::*;
  import qsd_tb_pkg::*;

  localparam int N = 4;

  logic [3*N-1:0]     a;
  qsd_digit_t         b;
  logic [3*(N+1)-1:0] m;
  int checks = 0, failures = 0, carry2_seen = 0;

  qsd_ppgen #(.N(N)) dut (.a(a), .b(b), .m(m));

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2401; k++) begin
      automatic int r = k;
      for (int i = 0; i < N; i++) begin
        a[3*i +: 3] = 3'((r % 7) - 3);
        r = r / 7;
      end
      for (int j = -3; j <= 3; j++) begin
        wide_t ve, vm;
        b = 3'(j);
        #1;
        ve = value(vec_t'(a), N) * wide_t'(j);
        vm = value(vec_t'(m), N + 1);
        checks++;
        if (vm != ve || !legal(vec_t'(m), N + 1)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%0d: m=%h (value %0d, expected %0d)", a, j, m, vm, ve);
        end
        for (int i = 0; i < N; i++)
          if ((j == 3 || j == -3) && (digit(vec_t'(a), i) == 3 || digit(vec_t'(a), i) == -3))
            carry2_seen++;
      end
    end
    checks++;
    if (carry2_seen == 0) failures++;
    $display("digit products of magnitude 9: %0d", carry2_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
