// qsd_digit_mult: single-digit QSD multiplier.
//
// The product of two digits in -3..3 takes one of the values 0, +-1, +-2,
// +-3, +-4, +-6, +-9. It is recoded as p = 4*c + m with both c and m in -2..2:
//   9 -> (2, 1)   6 -> (1, 2)   4 -> (1, 0)   3 -> (1, -1)
//   |p| <= 2 -> (0, p), and the negative products mirror the positive ones.
// The carry c of magnitude 2 (for +-9) is why a partial product generator must
// gather these outputs with a full QSD adder stage (qsd_ppgen). The recoding is
// the published design's single-digit multiplication table, written as a case on the
// arithmetic product.
//
// Interface: a, b, c, m are 3-bit two's-complement digits. Purely
// combinational. An illegal digit 3'b100 gives c = m = 0 (own choice).
module qsd_digit_mult
  import qsd_pkg::*;
(
  input  qsd_digit_t a,
  input  qsd_digit_t b,
  output qsd_digit_t c,
  output qsd_digit_t m
);

  logic signed [5:0] p;

  always_comb begin
    p = 6'(a) * 6'(b);
    unique case (p)
      6'sd9:  begin c =  3'sd2; m =  3'sd1; end
      6'sd6:  begin c =  3'sd1; m =  3'sd2; end
      6'sd4:  begin c =  3'sd1; m =  3'sd0; end
      6'sd3:  begin c =  3'sd1; m = -3'sd1; end
      6'sd2:  begin c =  3'sd0; m =  3'sd2; end
      6'sd1:  begin c =  3'sd0; m =  3'sd1; end
      6'sd0:  begin c =  3'sd0; m =  3'sd0; end
      -6'sd1: begin c =  3'sd0; m = -3'sd1; end
      -6'sd2: begin c =  3'sd0; m = -3'sd2; end
      -6'sd3: begin c = -3'sd1; m =  3'sd1; end
      -6'sd4: begin c = -3'sd1; m =  3'sd0; end
      -6'sd6: begin c = -3'sd1; m = -3'sd2; end
      -6'sd9: begin c = -3'sd2; m = -3'sd1; end
      default: begin c = 3'sd0; m = 3'sd0; end
    endcase
  end

endmodule
