// qsd_csg: QSD intermediate carry / sum generator (first step of the
// carry-free QSD addition).
//
// The two input digits a and b (each -3..3) add to a value v in -6..6. It is
// recoded as v = 4*c + s with the carry c limited to -1..1 and the sum s
// limited to -2..2:
//   v >=  3 : c =  1, s = v - 4
//   v <= -3 : c = -1, s = v + 4
//   else    : c =  0, s = v
// Because |s| <= 2 and |c| <= 1, the second step (qsd_step2) can absorb the
// carry from the digit below without producing a further carry. This recoding
// follows the published design's intermediate carry/sum mapping table; it is written here
// as a case on the digit sum rather than as hand-minimised Boolean equations.
//
// Interface: a, b are 3-bit two's-complement digits; c is a 2-bit
// two's-complement carry; s is a 3-bit two's-complement digit. Purely
// combinational. The illegal digit 3'b100 gives c = 0, s = 0 (own choice).
module qsd_csg
  import qsd_pkg::*;
(
  input  qsd_digit_t a,
  input  qsd_digit_t b,
  output qsd_carry_t c,
  output qsd_digit_t s
);

  logic signed [3:0] v;

  always_comb begin
    v = 4'(a) + 4'(b);
    unique case (v)
      4'sd6:  begin c =  2'sd1; s =  3'sd2; end
      4'sd5:  begin c =  2'sd1; s =  3'sd1; end
      4'sd4:  begin c =  2'sd1; s =  3'sd0; end
      4'sd3:  begin c =  2'sd1; s = -3'sd1; end
      4'sd2:  begin c =  2'sd0; s =  3'sd2; end
      4'sd1:  begin c =  2'sd0; s =  3'sd1; end
      4'sd0:  begin c =  2'sd0; s =  3'sd0; end
      -4'sd1: begin c =  2'sd0; s = -3'sd1; end
      -4'sd2: begin c =  2'sd0; s = -3'sd2; end
      -4'sd3: begin c = -2'sd1; s =  3'sd1; end
      -4'sd4: begin c = -2'sd1; s =  3'sd0; end
      -4'sd5: begin c = -2'sd1; s = -3'sd1; end
      -4'sd6: begin c = -2'sd1; s = -3'sd2; end
      default: begin c = 2'sd0; s = 3'sd0; end
    endcase
  end

endmodule
