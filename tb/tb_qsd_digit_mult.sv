// tb_qsd_digit_mult: exhaustive self-checking test of the single-digit QSD
// multiplier. For all 49 digit pairs, (c, m) must equal the recoding of the
// product a*b from a lookup table indexed by the product (9 -> (2,1),
// 6 -> (1,2), 4 -> (1,0), 3 -> (1,-1), |p| <= 2 -> (0,p), negatives
// mirrored), and 4*c + m must equal a*b.
module tb_qsd_digit_mult;
  import qsd_pkg::*;

  qsd_digit_t a, b, c, m;
  int checks = 0, failures = 0;

  qsd_digit_mult dut (.a(a), .b(b), .c(c), .m(m));

  // Expected (carry, low digit) for products 0..9; -1 marks impossible ones.
  int exp_c [10] = '{0, 0, 0, 1, 1, -1, 1, -1, -1, 2};
  int exp_m [10] = '{0, 1, 2, -1, 0, -1, 2, -1, -1, 1};

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -3; i <= 3; i++) begin
      for (int j = -3; j <= 3; j++) begin
        int p, ap, ec, em;
        a = 3'(i);
        b = 3'(j);
        #1;
        p  = i * j;
        ap = (p < 0) ? -p : p;
        ec = (p < 0) ? -exp_c[ap] : exp_c[ap];
        em = (p < 0) ? -exp_m[ap] : exp_m[ap];
        checks++;
        if (int'(c) != ec || int'(m) != em || 4 * int'(c) + int'(m) != p) begin
          failures++;
          $display("FAIL a=%0d b=%0d: c=%0d m=%0d, expected c=%0d m=%0d",
                   i, j, c, m, ec, em);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
