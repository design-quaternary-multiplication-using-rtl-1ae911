// qsd_addsub: N-digit carry-free QSD adder / borrow-free subtractor.
//
// The negative of a QSD number is obtained digit by digit (each digit x becomes
// -x), so subtraction needs no borrow chain: when sub is 1 every digit of b is
// negated (3-bit two's-complement negation, valid for -3..3) and the result is
// fed to the ordinary carry-free adder (qsd_adder). The digit-wise negation
// follows the published design's definition of a negative QSD number; the sub control
// input is this implementation's own interface.
//
// Parameters: N digits (default 64). Interface: a, b, s are N packed 3-bit
// digits; sub selects a - b (1) or a + b (0); cout is the result's digit N,
// 2-bit two's complement (-1..1). Purely combinational.
module qsd_addsub
  import qsd_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [DIGIT_W*N-1:0] a,
  input  logic [DIGIT_W*N-1:0] b,
  input  logic                 sub,
  output logic [DIGIT_W*N-1:0] s,
  output qsd_carry_t           cout
);

  logic [DIGIT_W*N-1:0] b_eff;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      b_eff[DIGIT_W*i +: DIGIT_W] = sub ? -b[DIGIT_W*i +: DIGIT_W]
                                        :  b[DIGIT_W*i +: DIGIT_W];
    end
  end

  qsd_adder #(.N(N)) u_adder (
    .a    (a),
    .b    (b_eff),
    .s    (s),
    .cout (cout)
  );

endmodule
