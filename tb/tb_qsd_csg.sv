// tb_qsd_csg: exhaustive self-checking test of the QSD carry/sum generator.
// All 49 legal digit pairs are applied; each result must satisfy
// 4*c + s = a + b with |c| <= 1 and |s| <= 2, and must match the recoding
// table (carry +1 for sums 3..6, -1 for -6..-3, else 0).
module tb_qsd_csg;
  import qsd_pkg::*;

  qsd_digit_t a, b, s;
  qsd_carry_t c;
  int checks = 0, failures = 0;

  qsd_csg dut (.a(a), .b(b), .c(c), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -3; i <= 3; i++) begin
      for (int j = -3; j <= 3; j++) begin
        int v, ec, es;
        a = 3'(i);
        b = 3'(j);
        #1;
        v  = i + j;
        ec = (v >= 3) ? 1 : (v <= -3) ? -1 : 0;
        es = v - 4 * ec;
        checks++;
        if (int'(c) != ec || int'(s) != es) begin
          failures++;
          $display("FAIL a=%0d b=%0d: c=%0d s=%0d, expected c=%0d s=%0d",
                   i, j, c, s, ec, es);
        end
        checks++;
        if (4 * int'(c) + int'(s) != v || s == 3'sd3 || s == -3'sd3) begin
          failures++;
          $display("FAIL a=%0d b=%0d: value or range rule broken", i, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
