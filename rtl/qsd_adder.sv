// qsd_adder: N-digit carry-free QSD adder.
//
// Every digit position i has a carry/sum generator (qsd_csg) that turns
// a_i + b_i into an intermediate carry c_i and sum s_i. Digit 0 of the result
// is s_0 directly; digit i (1..N-1) is a second-step adder (qsd_step2) that adds
// c_{i-1} to s_i. The carry of the top digit, c_{N-1}, is brought out as cout,
// so the result has N+1 digits. There is no ripple: every output digit depends
// only on input digits i and i-1, and the delay is the same for any N. This is
// the structure of the published design's n-digit adder (n generators, n-1 second-step
// adders).
//
// Parameters: N, the number of digits (default 64, i.e. a 128-bit-equivalent
// adder, the largest size the published design was evaluated at; own choice of default).
// Interface: a, b, s are N packed 3-bit two's-complement digits, digit i in
// bits [3i+2:3i]; cout is the 2-bit two's-complement carry-out digit (-1..1).
// Purely combinational.
module qsd_adder
  import qsd_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [DIGIT_W*N-1:0] a,
  input  logic [DIGIT_W*N-1:0] b,
  output logic [DIGIT_W*N-1:0] s,
  output qsd_carry_t           cout
);

  qsd_carry_t ic [N];  // intermediate carries
  qsd_digit_t is [N];  // intermediate sums

  for (genvar i = 0; i < N; i++) begin : g_digit
    qsd_csg u_csg (
      .a (a[DIGIT_W*i +: DIGIT_W]),
      .b (b[DIGIT_W*i +: DIGIT_W]),
      .c (ic[i]),
      .s (is[i])
    );
    if (i == 0) begin : g_low
      assign s[DIGIT_W*i +: DIGIT_W] = is[i];
    end else begin : g_step2
      qsd_step2 u_step2 (
        .a (ic[i-1]),
        .b (is[i]),
        .s (s[DIGIT_W*i +: DIGIT_W])
      );
    end
  end

  assign cout = ic[N-1];

  initial assert (N >= 1) else $error("qsd_adder: N must be at least 1");

endmodule
