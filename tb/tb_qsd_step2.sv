// tb_qsd_step2: exhaustive self-checking test of the second-step QSD adder.
// All 15 (carry -1..1, sum -2..2) pairs are applied; the result digit must
// equal carry + sum.
module tb_qsd_step2;
  import qsd_pkg::*;

  qsd_carry_t a;
  qsd_digit_t b, s;
  int checks = 0, failures = 0;

  qsd_step2 dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -1; i <= 1; i++) begin
      for (int j = -2; j <= 2; j++) begin
        a = 2'(i);
        b = 3'(j);
        #1;
        checks++;
        if (int'(s) != i + j) begin
          failures++;
          $display("FAIL carry=%0d sum=%0d: got %0d", i, j, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
